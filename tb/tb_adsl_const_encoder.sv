// tb_adsl_const_encoder: checks tone ordering, QAM mapping and sync symbols.
//
// Superframes are shortened to 2 data symbols plus the sync symbol.  The
// bit table gets random allocations of 0 and 2..15 bits and the tone order
// a random permutation; writes of 1 bit or above cfg_bmax must be refused
// with tbl_err.  Random bytes then flow in with random gaps while the
// output is randomly stalled.  Every output tone must match the reference:
// the tone from the order table, b bits taken from the serial stream (first
// bit = v0) mapped by the even/odd QAM rules, and, in every third symbol,
// the sync pattern on tones 1..127 in natural order.  After 9 symbols the
// order is rebuilt from the bit table with ord_build: no tone may leave for
// the 16 * 127 clocks it takes, and the next 3 symbols must serve the tones
// by increasing bit count, ties by tone index.
module tb_adsl_const_encoder;
  import tb_adsl_ref_pkg::*;

  localparam int SF   = 2;
  localparam int NSYM = 9;     // symbols with the written order
  localparam int NSYM2 = 12;   // total, the last ones with the built order

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              tx_en = 1'b0;
  logic [3:0]        cfg_bmax = 4'd15;
  logic              tbl_we = 1'b0;
  logic [6:0]        tbl_tone = '0;
  logic [3:0]        tbl_bits = '0;
  logic              tbl_err;
  logic              ord_we = 1'b0;
  logic [6:0]        ord_pos = '0;
  logic [6:0]        ord_tone = '0;
  logic              ord_build = 1'b0;
  logic              ord_busy;
  logic              in_valid = 1'b0, in_ready;
  logic [7:0]        in_data = '0;
  logic              out_valid, out_ready = 1'b0;
  logic [6:0]        out_tone;
  logic signed [8:0] out_x, out_y;
  logic              out_last, out_sync;
  int checks = 0, failures = 0, syncs = 0, stalls = 0;

  int bits_of[128];
  int order[127];
  bq_t src;
  bit  stream[$];
  bit  syncbits[$];

  adsl_const_encoder #(.SF_FRAMES(SF)) dut (.*);

  always #5 clk = ~clk;

  task automatic write_bits(int tone, int b, bit expect_err);
    @(negedge clk);
    tbl_we = 1'b1; tbl_tone = 7'(tone); tbl_bits = 4'(b);
    @(negedge clk);
    tbl_we = 1'b0;
    checks++;
    if (tbl_err !== expect_err) begin
      failures++;
      $display("FAIL table write tone %0d bits %0d: tbl_err %0b", tone, b, tbl_err);
    end
  endtask

  initial begin
    int sbit, sym, pos;
    bit built;
    built = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // refused writes
    cfg_bmax = 4'd8;
    write_bits(5, 1, 1'b1);
    write_bits(5, 9, 1'b1);
    write_bits(5, 8, 1'b0);
    cfg_bmax = 4'd15;
    // random allocation and order
    for (int t = 1; t < 128; t++) begin
      int b;
      b = $urandom_range(0, 14);
      if (b == 1) b = 0;
      if (t == 3) b = 15;
      if (t == 4) b = 2;
      if (t == 5) b = 3;
      bits_of[t] = b;
      write_bits(t, b, 1'b0);
    end
    for (int p = 0; p < 127; p++) order[p] = p + 1;
    order.shuffle();
    foreach (order[p]) begin
      @(negedge clk);
      ord_we = 1'b1; ord_pos = 7'(p); ord_tone = 7'(order[p]);
    end
    @(negedge clk);
    ord_we = 1'b0;
    tx_en  = 1'b1;
    for (int i = 0; i < 2000; i++) src.push_back(8'($urandom));
    foreach (src[i]) for (int k = 7; k >= 0; k--) stream.push_back(src[i][k]);
    ref_sync_bits(254, syncbits);
    fork
      begin : drive
        int k;
        k = 0;
        forever begin
          in_valid = ($urandom_range(0, 2) != 0);
          in_data  = src[k];
          @(posedge clk);
          if (in_valid && in_ready) k++;
          #1;
        end
      end
      begin : check
        sbit = 0; sym = 0; pos = 0;
        while (sym < NSYM2) begin
          if (sym == NSYM && pos == 0 && !built) begin
            int busy_cyc, o;
            // derive the order from the bit table: by bit count, then tone
            out_ready = 1'b0;
            @(negedge clk);
            ord_build = 1'b1;
            @(negedge clk);
            ord_build = 1'b0;
            busy_cyc = 0;
            while (ord_busy) begin
              checks++;
              if (out_valid) begin failures++; $display("FAIL output while the order is built"); end
              @(negedge clk);
              busy_cyc++;
            end
            checks++;
            if (busy_cyc != 16 * 127) begin
              failures++;
              $display("FAIL order build took %0d clocks", busy_cyc);
            end
            o = 0;
            for (int bb = 0; bb < 16; bb++)
              for (int t = 1; t < 128; t++)
                if (bits_of[t] == bb) begin order[o] = t; o = o + 1; end
            built = 1'b1;
          end
          out_ready = ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (out_valid && !out_ready) stalls++;
          if (out_valid && out_ready) begin
            bit is_sync;
            int tone, b, v, ex, ey;
            is_sync = (sym % (SF + 1) == SF);
            tone = is_sync ? pos + 1 : order[pos];
            if (is_sync) begin
              v = int'(syncbits[2*pos]) | (int'(syncbits[2*pos+1]) << 1);
              ref_qam(v, 2, ex, ey);
            end else begin
              b = bits_of[tone];
              v = 0;
              for (int j = 0; j < b; j++) v |= int'(stream[sbit + j]) << j;
              sbit += b;
              ref_qam(v, b, ex, ey);
            end
            checks++;
            if (out_tone != 7'(tone) || int'(out_x) != ex || int'(out_y) != ey ||
                out_sync !== is_sync || out_last !== (pos == 126)) begin
              failures++;
              if (failures < 10)
                $display("FAIL sym %0d pos %0d: tone %0d (%0d,%0d) sync %0b last %0b, expected tone %0d (%0d,%0d)",
                         sym, pos, out_tone, out_x, out_y, out_sync, out_last, tone, ex, ey);
            end
            if (out_sync) syncs++;
            pos++;
            if (pos == 127) begin pos = 0; sym++; end
          end
          #1;
        end
      end
    join_any
    disable drive;
    checks++;
    if (syncs != 127 * (NSYM2 / (SF + 1)) || stalls == 0) begin
      failures++;
      $display("FAIL sync tones %0d, stalls %0d", syncs, stalls);
    end
    $display("sync tones %0d, output stalls %0d", syncs, stalls);
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
