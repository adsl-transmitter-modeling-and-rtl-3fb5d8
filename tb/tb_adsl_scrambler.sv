// tb_adsl_scrambler: checks d_n = D_n ^ d_(n-18) ^ d_(n-23) over a long stream.
//
// 2000 random bytes pass with random valid gaps and back-pressure; the
// output stream must equal the bit-level reference run from the all-zero
// state, so stalled cycles must not advance the scrambler.  A descrambler
// (D_n = d_n ^ d_(n-18) ^ d_(n-23)) applied to the output must also give
// the input back.
module tb_adsl_scrambler;
  import tb_adsl_ref_pkg::*;

  localparam int NB = 2000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready;
  logic [7:0] in_data = '0;
  logic       out_valid, out_ready = 1'b0;
  logic [7:0] out_data;
  int checks = 0, failures = 0, stalls = 0;
  bq_t din, exp_q, got;

  adsl_scrambler dut (.*);

  always #5 clk = ~clk;

  initial begin
    int k;
    for (int i = 0; i < NB; i++) din.push_back(8'($urandom));
    exp_q = ref_scramble(din);
    k = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (k < NB) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 3) != 0);
      in_data   = din[k];
      @(posedge clk);
      if (in_valid && !out_ready) stalls++;
      if (in_valid && in_ready) begin
        got.push_back(out_data);
        checks++;
        if (out_data !== exp_q[k]) begin
          failures++;
          if (failures < 10) $display("FAIL byte %0d: %02h expected %02h", k, out_data, exp_q[k]);
        end
        k++;
      end
      #1;
    end
    // descramble the captured stream
    begin
      bit d[$];
      int n, errs;
      n = 0; errs = 0;
      foreach (got[i]) for (int b = 7; b >= 0; b--) d.push_back(got[i][b]);
      foreach (din[i]) for (int b = 7; b >= 0; b--) begin
        bit x;
        x = d[n] ^ ((n >= 18) ? d[n-18] : 1'b0) ^ ((n >= 23) ? d[n-23] : 1'b0);
        if (x != din[i][b]) errs++;
        n++;
      end
      checks++;
      if (errs != 0 || stalls == 0) begin
        failures++;
        $display("FAIL descrambler mismatches %0d, stalls %0d", errs, stalls);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
