// tb_adsl_interleaver: checks the (D-1)*I convolutional interleaving rule.
//
// The buffer is reduced to 256 bytes for speed.  For each (N, D) setting,
// odd and even N and D = 1, 2, 4, 8, 16, the interleaver is reset and a
// random stream of whole codewords is pushed with random gaps and
// back-pressure.  The output must match the reference, which schedules
// every byte at its output time (zero where no byte has arrived yet,
// dummy byte dropped for even N).  The reset clearing must keep in_ready
// low for exactly DEPTH clocks, and dummy steps must occur once per
// even-length codeword.
module tb_adsl_interleaver;
  import tb_adsl_ref_pkg::*;

  localparam int DEPTH = 256;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [4:0]  cfg_d = 5'd1;
  logic [11:0] cfg_n = 12'd1;
  logic        in_valid = 1'b0, in_ready;
  logic [7:0]  in_data = '0;
  logic        out_valid, out_ready = 1'b0;
  logic [7:0]  out_data;
  logic        dummy_step;
  int checks = 0, failures = 0, dummies = 0;

  adsl_interleaver #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (dummy_step) dummies++;

  task automatic run(int n, int d, int ncw);
    bq_t din, exp_q, got;
    int k, init_cyc, cyc;
    for (int i = 0; i < n * ncw; i++) din.push_back(8'($urandom_range(1, 255)));
    exp_q = ref_interleave(din, n, d);
    cfg_n = 12'(n);
    cfg_d = 5'(d);
    dummies = 0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    init_cyc = 0;
    while (!(in_ready || dummy_step)) begin @(negedge clk); init_cyc++; end
    checks++;
    if (init_cyc != DEPTH) begin
      failures++;
      $display("FAIL buffer clearing took %0d clocks", init_cyc);
    end
    k = 0; cyc = 0;
    while (got.size() < din.size() && cyc < 50000) begin
      in_valid  = (k < din.size()) && ($urandom_range(0, 3) != 0);
      in_data   = (k < din.size()) ? din[k] : 8'h00;
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      cyc++;
      if (out_valid && out_ready) got.push_back(out_data);
      if (in_valid && in_ready) k++;
      #1;
    end
    in_valid = 1'b0;
    foreach (exp_q[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp_q[i]) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d D=%0d byte %0d: %02h expected %02h", n, d, i,
                                    (i < got.size()) ? got[i] : 8'h00, exp_q[i]);
      end
    end
    checks++;
    if (dummies != ((n % 2 == 0 && d > 1) ? ncw : 0) && dummies != ncw + 1) begin
      failures++;
      $display("FAIL N=%0d D=%0d: %0d dummy steps", n, d, dummies);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run(7, 1, 6);
    run(7, 2, 8);
    run(8, 2, 8);
    run(9, 4, 8);
    run(12, 4, 8);
    run(15, 8, 8);
    run(16, 8, 8);
    run(17, 16, 6);
    run(16, 16, 6);
    run(31, 2, 6);
    $display("dummy steps in the last run: %0d", dummies);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
