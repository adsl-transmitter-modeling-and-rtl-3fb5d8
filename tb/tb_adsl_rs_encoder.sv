// tb_adsl_rs_encoder: checks Reed-Solomon codewords for R = 0, 4, 8, 16.
//
// For each (R, message length) pair several codewords of random bytes are
// streamed with random valid gaps and back-pressure.  Every output codeword
// must be the message followed by the parity from polynomial long division
// in the reference model, and must vanish at alpha^0 .. alpha^(R-1).  With
// no back-pressure the parity phase must last exactly R clocks (input held
// that long).  One configuration is the reference design's codeword:
// K*S = 126*4 = 504 message bytes with R = 4.
module tb_adsl_rs_encoder;
  import tb_adsl_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [4:0]  cfg_r = '0;
  logic [11:0] cfg_msg_len = 12'd1;
  logic        in_valid = 1'b0, in_ready;
  logic [7:0]  in_data = '0;
  logic        out_valid, out_ready = 1'b0;
  logic [7:0]  out_data;
  logic        out_parity, out_cw_last;
  int checks = 0, failures = 0;

  adsl_rs_encoder dut (.*);

  always #5 clk = ~clk;

  task automatic run_cw(int r, int len, bit pressure);
    bq_t msg, exp_q, got;
    int k, held, cyc;
    for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
    exp_q = msg;
    begin
      bq_t p;
      p = ref_rs_parity(msg, r);
      foreach (p[i]) exp_q.push_back(p[i]);
    end
    cfg_r = 5'(r);
    cfg_msg_len = 12'(len);
    k = 0; held = 0; cyc = 0;
    while (got.size() < len + r) begin
      in_valid  = pressure ? ($urandom_range(0, 3) != 0) : 1'b1;
      out_ready = pressure ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_valid  = in_valid && (k < len);
      in_data   = (k < len) ? msg[k] : 8'h00;
      @(posedge clk);
      cyc++;
      if (k == len && !in_ready) held++;
      if (out_valid && out_ready) begin
        got.push_back(out_data);
        checks++;
        if (out_parity !== (got.size() > len)) begin
          failures++;
          $display("FAIL out_parity flag, R=%0d byte %0d", r, got.size() - 1);
        end
        if (out_cw_last !== (got.size() == len + r)) begin
          failures++;
          $display("FAIL out_cw_last flag, R=%0d byte %0d", r, got.size() - 1);
        end
      end
      if (in_valid && in_ready) k++;
      #1;
      if (cyc > 100000) break;
    end
    in_valid = 1'b0;
    foreach (exp_q[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp_q[i]) begin
        failures++;
        if (failures < 10) $display("FAIL R=%0d len=%0d byte %0d: %02h expected %02h", r, len, i,
                                    (i < got.size()) ? got[i] : 8'h00, exp_q[i]);
      end
    end
    for (int e = 0; e < r; e++) begin
      checks++;
      if (ref_rs_syndrome(got, e) != 0) begin
        failures++;
        $display("FAIL R=%0d len=%0d: nonzero syndrome %0d", r, len, e);
      end
    end
    if (!pressure) begin
      checks++;
      if (held != r || cyc != len + r) begin
        failures++;
        $display("FAIL R=%0d len=%0d: parity phase %0d clocks, codeword %0d clocks", r, len, held, cyc);
      end
    end
  endtask

  initial begin
    automatic int rs[4] = '{4, 8, 16, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (rs[i]) begin
      for (int c = 0; c < 6; c++) run_cw(rs[i], $urandom_range(1, 60), c != 0);
      run_cw(rs[i], 200, 1'b1);
    end
    run_cw(4, 504, 1'b0);
    run_cw(4, 504, 1'b1);
    run_cw(16, 239, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
