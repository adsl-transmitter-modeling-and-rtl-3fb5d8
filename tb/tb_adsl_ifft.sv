// tb_adsl_ifft: checks the 256-point IFFT against a direct real-valued sum.
//
// Five symbols are sent: random 9-bit points, full-scale points of equal
// sign (largest DC-like peak), and 4-QAM-like small points.  Tones arrive in
// a random order with random gaps; output is randomly stalled.  Each of
// the 256 samples must be within TOL of sum_k 2*(X cos - Y sin), the
// out_first/out_last flags must sit on samples 0 and 255, and the first
// sample must appear exactly 1024 clocks (8 stages x 128 butterflies) after
// the last tone is taken.
module tb_adsl_ifft;
  import tb_adsl_ref_pkg::*;

  localparam real TOL = 6.0;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               in_valid = 1'b0, in_ready;
  logic [6:0]         in_tone = '0;
  logic signed [8:0]  in_x = '0, in_y = '0;
  logic               in_last = 1'b0;
  logic               out_valid, out_ready = 1'b0;
  logic signed [17:0] out_data;
  logic               out_first, out_last;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  int xs[128], ys[128];

  adsl_ifft dut (.*);

  always #5 clk = ~clk;

  task automatic run_symbol(int mode);
    int ord[127];
    int lat, n, stalls;
    for (int k = 1; k < 128; k++) begin
      unique case (mode)
        0: begin xs[k] = $urandom_range(0, 510) - 255; ys[k] = $urandom_range(0, 510) - 255; end
        1: begin xs[k] = 255; ys[k] = -255; end
        2: begin xs[k] = ($urandom_range(0, 1) != 0) ? 255 : -255; ys[k] = ($urandom_range(0, 1) != 0) ? 255 : -255; end
        default: begin xs[k] = ($urandom_range(0, 1) != 0) ? 1 : -1; ys[k] = ($urandom_range(0, 1) != 0) ? 1 : -1; end
      endcase
    end
    xs[0] = 0; ys[0] = 0;
    for (int p = 0; p < 127; p++) ord[p] = p + 1;
    ord.shuffle();
    for (int p = 0; p < 127; p++) begin
      in_valid = 1'b0;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1'b1;
      in_tone  = 7'(ord[p]);
      in_x     = 9'(xs[ord[p]]);
      in_y     = 9'(ys[ord[p]]);
      in_last  = (p == 126);
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
    end
    in_valid = 1'b0;
    in_last  = 1'b0;
    lat = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 1024) begin
      failures++;
      $display("FAIL latency %0d clocks", lat);
    end
    n = 0; stalls = 0;
    while (n < 256) begin
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        real e, err;
        e = ref_sample(xs, ys, n);
        err = real'(out_data) - e;
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        checks++;
        if (err > TOL || out_first !== (n == 0) || out_last !== (n == 255)) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d sample %0d: %0d expected %f", mode, n, out_data, e);
        end
        n++;
      end else if (out_valid) stalls++;
      @(negedge clk);
    end
    out_ready = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_symbol(0);
    run_symbol(1);
    run_symbol(2);
    run_symbol(3);
    run_symbol(0);
    $display("largest sample error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
