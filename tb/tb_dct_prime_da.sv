// tb_dct_prime_da: end-to-end test of the prime-length DCT pipeline at its
// default parameters (N = 7, 8-bit samples).
//
// Blocks of samples (random, full-scale extremes, zero, impulses) are fed in
// the descending order the pipeline expects, with random gaps in one phase
// and back-to-back in another.  Each output Y(k) is compared with a
// double-precision evaluation of the DCT definition
// sum y(i) cos(pi*(2i+1)k/2N); Y(0) must be exact, Y(k>0) within TOL.  The
// test also checks the block latency and the steady-state block period
// against the stage timings, and counts how often each pipeline mechanism
// occurs: input stall, both buffer banks in use, all three stages busy at
// once, and bank changes in both buffers.  A mechanism never seen counts
// as a failure.
module tb_dct_prime_da;
  localparam int    N    = 7;
  localparam int    W_IN = 8;
  localparam int    CF   = 12;
  localparam int    L    = (N - 1) / 2;
  localparam int    M    = W_IN + $clog2(N) + 1;
  localparam int    ZW   = M + $clog2(L + 1) + 3;
  localparam int    YW   = ZW + CF + 1;
  localparam int    NB   = 40;              // blocks
  localparam real   TOL  = 4.0;
  localparam real   PI   = 3.14159265358979323846;
  // stage timings (see the module headers)
  localparam int    S3_PERIOD = 2 + (N - 1) * (ZW + 4);
  // from the cycle of the last sample y(0) of a block to its Y(N-1)
  localparam int    LATENCY   = 1 + (N + 4 + L * M) + 1 + (N - 1) * (ZW + 4);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_last;
  logic signed [W_IN-1:0] in_y;
  logic [$clog2(N)-1:0] out_k;
  logic signed [YW-1:0] out_y;
  logic [1:0] stat_pre_full, stat_post_full;
  logic [2:0] stat_busy;

  dct_prime_da dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // stimulus storage
  int  blk_y   [NB][N];
  real blk_ref [NB][N];
  int  last_in_cycle [NB];

  function automatic int pick_sample(int b, int i);
    case (b)
      0: return 127;
      1: return -128;
      2: return 0;
      3: return (i == 0) ? 100 : 0;
      4: return (i == N - 1) ? -77 : 0;
      5: return (i % 2 == 0) ? 127 : -128;
      6: return (i % 2 == 0) ? -128 : 127;
      default: return $signed($urandom_range(255, 0)) - 128;
    endcase
  endfunction

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < N; i++) blk_y[b][i] = pick_sample(b, i);
      for (int k = 0; k < N; k++) begin
        real s;
        s = 0.0;
        for (int i = 0; i < N; i++) s += real'(blk_y[b][i]) * $cos(PI * real'((2 * i + 1) * k) / real'(2 * N));
        blk_ref[b][k] = s;
      end
    end
  end

  // driver: blocks 0..NB/2-1 with random gaps, the rest back to back
  initial begin
    in_valid = 0; in_y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int b = 0; b < NB; b++) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (b < NB / 2) begin
          in_valid <= 1'b0;
          repeat ($urandom_range(3, 0)) @(posedge clk);
        end
        in_valid <= 1'b1;
        in_y     <= W_IN'(blk_y[b][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (i == 0) last_in_cycle[b] = cycle;
      end
    end
    in_valid <= 1'b0;
  end

  // monitor
  int ob = 0, ok = 0;
  int last_cycle_prev = -1;
  int n_period = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (out_valid) begin
        real got;
        got = real'(out_y) / (2.0 ** CF);
        checks++;
        if (ob >= NB) begin
          failures++; $display("FAIL: output beyond the last block");
        end else begin
          if (int'(out_k) != ok) begin
            failures++; $display("FAIL: block %0d expected k=%0d got %0d", ob, ok, out_k);
          end
          checks++;
          if ((ok == 0 && got != blk_ref[ob][0]) ||
              (got - blk_ref[ob][ok] > TOL) || (blk_ref[ob][ok] - got > TOL)) begin
            failures++;
            $display("FAIL: block %0d Y(%0d) = %f expected %f", ob, ok, got, blk_ref[ob][ok]);
          end
          checks++;
          if (out_last != (ok == N - 1)) begin
            failures++; $display("FAIL: out_last wrong at block %0d k=%0d", ob, ok);
          end
          if (ok == N - 1) begin
            // latency of the first block, measured from its last sample
            if (ob == 0) begin
              checks++;
              if (cycle - last_in_cycle[0] != LATENCY) begin
                failures++;
                $display("FAIL: latency %0d expected %0d", cycle - last_in_cycle[0], LATENCY);
              end
            end
            // steady-state period once the input runs back to back
            if (ob > NB / 2 + 2) begin
              checks++; n_period++;
              if (cycle - last_cycle_prev != S3_PERIOD) begin
                failures++;
                $display("FAIL: block period %0d expected %0d", cycle - last_cycle_prev, S3_PERIOD);
              end
            end
            last_cycle_prev = cycle;
            ob++; ok = 0;
          end else ok++;
        end
      end
    end
  end

  // mechanism counters
  int n_stall = 0, n_pre_both = 0, n_post_both = 0, n_all_busy = 0;
  int n_pre_swap = 0, n_post_swap = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (stat_pre_full == 2'b11) n_pre_both++;
    if (stat_post_full == 2'b11) n_post_both++;
    if (stat_busy == 3'b111) n_all_busy++;
    if (stat_pre_full[1]) n_pre_swap++;
    if (stat_post_full[1]) n_post_swap++;
  end

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s seen %0d times", what, n);
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    wait (ob == NB);
    repeat (5) @(posedge clk);
    need("input stall", n_stall);
    need("input buffer both banks full", n_pre_both);
    need("output buffer both banks full", n_post_both);
    need("three stages busy at once", n_all_busy);
    need("input bank 1 holding a block", n_pre_swap);
    need("output bank 1 holding a block", n_post_swap);
    checks++;
    if (n_period == 0) begin failures++; $display("FAIL: no steady-state period measured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * 400 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d blocks out", ob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
