// tb_adsl_tx: end-to-end test of the transmitter at its default size.
//
// The reference configuration is used: 127 tones of 8 bits, K = 126 bytes
// per frame, S = 4, R = 4, D = 2, superframes of 68 data symbols plus one
// sync symbol.  Two whole superframes of random user bytes (2*68*126 - 2,
// the two CRC bytes being added by the framer) are pushed with random
// gaps while the sample output is randomly stalled.  The testbench builds
// the expected line signal independently: superframes with the CRC of the
// previous one, scrambling, RS parity by long division, interleaving by
// output-time scheduling, QAM points, a direct real IDFT and the cyclic
// prefix.  All 138 symbols x 272 samples must match within TOL.  It also
// counts the mechanisms of the chain (CRC bytes, parity bytes, interleaver
// dummy steps, sync tones, prefix samples, input and output stalls, a bit
// table write refused above cfg_bmax = 8, the tone order built from the bit
// table) and fails if any of them never happened or their counts are wrong.
module tb_adsl_tx;
  import tb_adsl_ref_pkg::*;

  localparam int  K = 126, S = 4, R = 4, D = 2, BITS = 8;
  localparam int  SF = 68;
  localparam int  NSF = 2;
  localparam int  NSYM = NSF * (SF + 1);
  localparam real TOL = 6.0;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               tx_en = 1'b0;
  logic [7:0]         cfg_k = 8'(K);
  logic [4:0]         cfg_s = 5'(S), cfg_r = 5'(R), cfg_d = 5'(D);
  logic [3:0]         cfg_bmax = 4'd8;
  logic               tbl_we = 1'b0;
  logic [6:0]         tbl_tone = '0;
  logic [3:0]         tbl_bits = '0;
  logic               tbl_err;
  logic               ord_we = 1'b0;
  logic [6:0]         ord_pos = '0, ord_tone = '0;
  logic               ord_build = 1'b0;
  logic               ord_busy;
  logic               in_valid = 1'b0, in_ready;
  logic [7:0]         in_data = '0;
  logic               out_valid, out_ready = 1'b0;
  logic signed [17:0] out_sample;
  logic               out_sym_first, out_prefix, out_sym_last;
  logic               ev_crc, ev_parity, ev_dummy, ev_sync;

  int checks = 0, failures = 0;
  int n_crc = 0, n_parity = 0, n_dummy = 0, n_sync = 0, n_prefix = 0;
  int n_in_stall = 0, n_out_stall = 0, n_refused = 0, n_build_clk = 0;
  real max_err = 0.0;

  bq_t user;
  int  qx[NSYM][128], qy[NSYM][128];

  adsl_tx dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (ev_crc)    n_crc++;
    if (ev_parity) n_parity++;
    if (ev_dummy)  n_dummy++;
    if (ev_sync)   n_sync++;
    if (out_valid && out_ready && out_prefix) n_prefix++;
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !out_ready) n_out_stall++;
  end

  // ---------------- reference chain ----------------
  task automatic build_reference();
    bq_t framed, scr, coded, il;
    bit  bits[$];
    bit  syncbits[$];
    int  u, b;
    for (int i = 0; i < NSF * SF * K - NSF; i++) user.push_back(8'($urandom));
    u = 0;
    for (int s = 0; s < NSF; s++) begin
      bq_t prev;
      prev.delete();
      if (s > 0) for (int i = 0; i < SF * K - 1; i++) prev.push_back(user[(s-1)*(SF*K-1) + i]);
      framed.push_back(s == 0 ? 8'd0 : ref_crc8(prev));
      for (int i = 0; i < SF * K - 1; i++) framed.push_back(user[u++]);
    end
    scr = ref_scramble(framed);
    for (int c = 0; c < scr.size() / (K * S); c++) begin
      bq_t msg, par;
      for (int i = 0; i < K * S; i++) msg.push_back(scr[c*K*S + i]);
      par = ref_rs_parity(msg, R);
      foreach (msg[i]) coded.push_back(msg[i]);
      foreach (par[i]) coded.push_back(par[i]);
    end
    il = ref_interleave(coded, K * S + R, D);
    foreach (il[i]) for (int k = 7; k >= 0; k--) bits.push_back(il[i][k]);
    ref_sync_bits(254, syncbits);
    b = 0;
    for (int sym = 0; sym < NSYM; sym++) begin
      qx[sym][0] = 0; qy[sym][0] = 0;
      for (int t = 1; t < 128; t++) begin
        int v, x, y;
        v = 0;
        if (sym % (SF + 1) == SF) begin
          v = int'(syncbits[2*(t-1)]) | (int'(syncbits[2*(t-1)+1]) << 1);
          ref_qam(v, 2, x, y);
        end else begin
          for (int j = 0; j < BITS; j++) v |= int'(bits[b + j]) << j;
          b += BITS;
          ref_qam(v, BITS, x, y);
        end
        qx[sym][t] = x; qy[sym][t] = y;
      end
    end
  endtask

  initial begin
    build_reference();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // bit allocation: 8 bits on every tone
    for (int t = 1; t < 128; t++) begin
      @(negedge clk);
      tbl_we = 1'b1; tbl_tone = 7'(t); tbl_bits = 4'(BITS);
    end
    // a loading above cfg_bmax must be refused
    @(negedge clk);
    tbl_we = 1'b1; tbl_tone = 7'd9; tbl_bits = 4'd9;
    @(negedge clk);
    tbl_we = 1'b0;
    checks++;
    if (!tbl_err) begin failures++; $display("FAIL 9-bit write above cfg_bmax = 8 accepted"); end
    else n_refused++;
    // tone order from the bit table (equal loads: tones in index order)
    ord_build = 1'b1;
    @(negedge clk);
    ord_build = 1'b0;
    while (ord_busy) begin @(negedge clk); n_build_clk++; end
    tx_en  = 1'b1;
    fork
      begin : drive
        int k;
        k = 0;
        while (k < user.size()) begin
          in_valid = ($urandom_range(0, 7) != 0);
          in_data  = user[k];
          @(posedge clk);
          if (in_valid && in_ready) k++;
          #1;
        end
        in_valid = 1'b0;
      end
      begin : check
        for (int sym = 0; sym < NSYM; sym++) begin
          int xs[128], ys[128];
          real e[256];
          int n;
          for (int t = 0; t < 128; t++) begin xs[t] = qx[sym][t]; ys[t] = qy[sym][t]; end
          for (int i = 0; i < 256; i++) e[i] = ref_sample(xs, ys, i);
          n = 0;
          while (n < 272) begin
            out_ready = ($urandom_range(0, 4) != 0);
            @(posedge clk);
            if (out_valid && out_ready) begin
              real ex, err;
              ex  = e[(n < 16) ? 240 + n : n - 16];
              err = real'(out_sample) - ex;
              if (err < 0.0) err = -err;
              if (err > max_err) max_err = err;
              checks++;
              if (err > TOL || out_sym_first !== (n == 0) || out_prefix !== (n < 16) ||
                  out_sym_last !== (n == 271)) begin
                failures++;
                if (failures < 10) $display("FAIL symbol %0d sample %0d: %0d expected %f", sym, n, out_sample, ex);
              end
              n++;
            end
            #1;
          end
        end
      end
    join
    out_ready = 1'b0;
    repeat (5) @(posedge clk);
    checks += 8;
    if (n_build_clk != 16 * 127)       begin failures++; $display("FAIL order build took %0d clocks", n_build_clk); end
    if (n_crc < NSF)                   begin failures++; $display("FAIL CRC bytes %0d", n_crc); end
    if (n_parity != NSF*SF/S*R)        begin failures++; $display("FAIL parity bytes %0d", n_parity); end
    if (n_dummy < NSF*SF/S)            begin failures++; $display("FAIL dummy steps %0d", n_dummy); end
    if (n_sync != NSF*127)             begin failures++; $display("FAIL sync tones %0d", n_sync); end
    if (n_prefix != NSYM*16)           begin failures++; $display("FAIL prefix samples %0d", n_prefix); end
    if (n_in_stall == 0)               begin failures++; $display("FAIL input never stalled"); end
    if (n_out_stall == 0)              begin failures++; $display("FAIL output never stalled"); end
    $display("symbols %0d, CRC bytes %0d, parity bytes %0d, dummy steps %0d, sync tones %0d, prefix samples %0d",
             NSYM, n_crc, n_parity, n_dummy, n_sync, n_prefix);
    $display("refused table writes %0d, tone order built in %0d clocks", n_refused, n_build_clk);
    $display("input stall cycles %0d, output stall cycles %0d, largest sample error %f",
             n_in_stall, n_out_stall, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
