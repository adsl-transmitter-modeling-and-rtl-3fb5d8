// tb_adsl_tx_loads: end-to-end runs of the transmitter at other bit loadings.
//
// Three configurations are run from reset, each for one superframe plus
// three symbols (72 symbols, the sync symbol included):
//   - 4 bits on every tone, K = 62, S = 4, R = 4, D = 2 (the low-load case:
//     508 bits per symbol, so symbols do not end on byte boundaries);
//   - 15 bits on every tone, K = 234, S = 1, R = 4, D = 4, with a shuffled
//     tone order (the largest load the bit table allows);
//   - a random allocation of 0 and 2..15 bits, K = 100, S = 2, R = 8,
//     D = 8 (odd constellations, empty tones), with the tone order built by
//     the transmitter from the bit table (ord_build).
// The expected samples come from the same independent reference chain as
// in tb_adsl_tx (framing with CRC, scrambling, RS long division,
// interleaving by output-time scheduling, QAM, direct IDFT, prefix) and
// must match within TOL; output is randomly stalled.
module tb_adsl_tx_loads;
  import tb_adsl_ref_pkg::*;

  localparam int  SF = 68;
  localparam int  NSYM = SF + 4;
  localparam real TOL = 6.0;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               tx_en = 1'b0;
  logic [7:0]         cfg_k = '0;
  logic [4:0]         cfg_s = '0, cfg_r = '0, cfg_d = '0;
  logic [3:0]         cfg_bmax = 4'd15;
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
  real max_err = 0.0;

  adsl_tx dut (.*);

  always #5 clk = ~clk;

  task automatic run(int mode, int k, int s, int r, int d);
    int  bits_of[128];
    int  order[127];
    int  qx[NSYM][128], qy[NSYM][128];
    bq_t user, framed, scr, coded, il;
    bit  bits[$];
    bit  syncbits[$];
    int  total, need_bits, n_cw, n_framed, n_user, u, b;

    // allocation and order
    bits_of[0] = 0;
    for (int t = 1; t < 128; t++) begin
      unique case (mode)
        0: bits_of[t] = 4;
        1: bits_of[t] = 15;
        default: begin bits_of[t] = $urandom_range(0, 15); if (bits_of[t] == 1) bits_of[t] = 0; end
      endcase
    end
    for (int p = 0; p < 127; p++) order[p] = p + 1;
    if (mode == 1) order.shuffle();
    if (mode == 2) begin
      // order built by the transmitter: increasing bit count, then tone
      int o;
      o = 0;
      for (int bb = 0; bb < 16; bb++)
        for (int t = 1; t < 128; t++)
          if (bits_of[t] == bb) begin order[o] = t; o = o + 1; end
    end
    total = 0;
    for (int t = 1; t < 128; t++) total += bits_of[t];

    // enough input for NSYM symbols: whole codewords
    need_bits = (NSYM - NSYM / (SF + 1)) * total;
    n_cw      = ((need_bits + 7) / 8 + k * s + r - 1) / (k * s + r);
    n_framed  = n_cw * k * s;
    n_user    = n_framed - (n_framed + SF * k - 1) / (SF * k);
    for (int i = 0; i < n_user; i++) user.push_back(8'($urandom));

    // reference chain
    u = 0;
    for (int i = 0; i < n_framed; i++) begin
      if (i % (SF * k) == 0) begin
        bq_t prev;
        prev.delete();
        if (i > 0) for (int j = 0; j < SF * k - 1; j++) prev.push_back(user[u - (SF*k - 1) + j]);
        framed.push_back(i == 0 ? 8'd0 : ref_crc8(prev));
      end else begin
        framed.push_back(user[u++]);
      end
    end
    scr = ref_scramble(framed);
    for (int c = 0; c < n_cw; c++) begin
      bq_t msg, par;
      for (int i = 0; i < k * s; i++) msg.push_back(scr[c*k*s + i]);
      par = ref_rs_parity(msg, r);
      foreach (msg[i]) coded.push_back(msg[i]);
      foreach (par[i]) coded.push_back(par[i]);
    end
    il = ref_interleave(coded, k * s + r, d);
    foreach (il[i]) for (int q = 7; q >= 0; q--) bits.push_back(il[i][q]);
    ref_sync_bits(254, syncbits);
    b = 0;
    for (int sym = 0; sym < NSYM; sym++) begin
      qx[sym][0] = 0; qy[sym][0] = 0;
      for (int p = 0; p < 127; p++) begin
        int v, x, y, t;
        v = 0;
        if (sym % (SF + 1) == SF) begin
          t = p + 1;
          v = int'(syncbits[2*p]) | (int'(syncbits[2*p+1]) << 1);
          ref_qam(v, 2, x, y);
        end else begin
          t = order[p];
          for (int j = 0; j < bits_of[t]; j++) v |= int'(bits[b + j]) << j;
          b += bits_of[t];
          ref_qam(v, bits_of[t], x, y);
        end
        qx[sym][t] = x; qy[sym][t] = y;
      end
    end

    // configure the transmitter
    tx_en = 1'b0;
    cfg_k = 8'(k); cfg_s = 5'(s); cfg_r = 5'(r); cfg_d = 5'(d);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 1; t < 128; t++) if (bits_of[t] != 0) begin
      @(negedge clk);
      tbl_we = 1'b1; tbl_tone = 7'(t); tbl_bits = 4'(bits_of[t]);
    end
    @(negedge clk);
    tbl_we = 1'b0;
    if (mode == 2) begin
      @(negedge clk);
      ord_build = 1'b1;
      @(negedge clk);
      ord_build = 1'b0;
      while (ord_busy) @(negedge clk);
    end else begin
      foreach (order[p]) begin
        @(negedge clk);
        ord_we = 1'b1; ord_pos = 7'(p); ord_tone = 7'(order[p]);
      end
      @(negedge clk);
      ord_we = 1'b0;
    end
    tx_en  = 1'b1;

    fork
      begin : drive
        int kk;
        kk = 0;
        while (kk < user.size()) begin
          in_valid = 1'b1;
          in_data  = user[kk];
          @(posedge clk);
          if (in_ready) kk++;
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
              if (err > TOL || out_sym_first !== (n == 0)) begin
                failures++;
                if (failures < 10) $display("FAIL mode %0d symbol %0d sample %0d: %0d expected %f",
                                            mode, sym, n, out_sample, ex);
              end
              n++;
            end
            #1;
          end
        end
      end
    join
    out_ready = 1'b0;
    $display("mode %0d: %0d bits per symbol, %0d codewords of %0d bytes, %0d symbols checked",
             mode, total, n_cw, k * s + r, NSYM);
  endtask

  initial begin
    run(0, 62, 4, 4, 2);
    run(1, 234, 1, 4, 4);
    run(2, 100, 2, 8, 8);
    $display("largest sample error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
