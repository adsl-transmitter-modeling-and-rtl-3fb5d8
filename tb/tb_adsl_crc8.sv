// tb_adsl_crc8: checks the superframe CRC against polynomial long division.
//
// Random messages of 1..300 bytes are absorbed one byte per clock, with
// random idle clocks in between; after each message the remainder must
// equal M(D) D^8 mod G(D) computed by the reference model.  A clear in the
// middle of a message must restart the remainder, and the register must
// hold its value while en is low.
module tb_adsl_crc8;
  import tb_adsl_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear = 1'b0;
  logic       en = 1'b0;
  logic [7:0] data = '0;
  logic [7:0] crc;
  int checks = 0;
  int failures = 0;

  adsl_crc8 dut (.clk, .rst_n, .clear, .en, .data, .crc);

  always #5 clk = ~clk;

  task automatic absorb(bq_t msg);
    foreach (msg[i]) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin en = 1'b0; @(negedge clk); end
      en   = 1'b1;
      data = msg[i];
    end
    @(negedge clk);
    en = 1'b0;
  endtask

  task automatic check(byte unsigned exp, string what);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL %s: crc %02h expected %02h", what, crc, exp);
    end
  endtask

  initial begin
    bq_t msg;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      int len;
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      msg.delete();
      len = (t < 8) ? t + 1 : $urandom_range(1, 300);
      for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
      absorb(msg);
      check(ref_crc8(msg), $sformatf("message %0d", t));
      repeat (3) @(negedge clk);
      check(ref_crc8(msg), "hold while en low");
    end
    // clear wins over en: the byte of the clear cycle is not absorbed
    msg = {8'hA5, 8'h3C, 8'h77};
    absorb(msg);
    @(negedge clk);
    clear = 1'b1; en = 1'b1; data = 8'hFF;
    @(negedge clk);
    clear = 1'b0; en = 1'b0;
    msg = {8'h12, 8'h34};
    absorb(msg);
    check(ref_crc8(msg), "restart after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
