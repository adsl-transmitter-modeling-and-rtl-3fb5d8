// adsl_const_encoder: tone ordering, QAM constellation mapping and sync
// symbol insertion.
//
// The bit allocation table gives each sub-channel (tone 1..N_TONES-1; tone
// 0 carries nothing) 0 or 2..cfg_bmax bits, cfg_bmax being programmable
// from 8 to 15.  The tone order table lists, for each position of a symbol,
// which tone is served next.  It can be written entry by entry, or built
// from the bit allocation table by a pulse on ord_build: tones are then
// ordered by increasing bit count, ties by increasing tone index (the ADSL
// standard's tone ordering), by a counting pass over all 16 bit counts
// that takes 16 * (N_TONES-1) clocks with ord_busy high and no symbol out.
// For every data symbol the encoder walks the
// positions in order, takes b bits of the tone from a bit queue fed by the
// incoming bytes (a byte's MSB first; the first bit taken becomes v0) and
// maps them to a QAM point (X, Y):
//   even b: X = (v(b-1) v(b-3) .. v1 1), Y = (v(b-2) .. v0 1), two's complement;
//   odd b:  X = (v(b-1) .. v2 v0 1), Y = (v(b-2) .. v1 1), a rectangular grid.
// The even rule is the ADSL standard's; the odd one is this design's
// simplification of the standard's cross constellations.  Tones with b = 0
// send (0, 0).  After SF_FRAMES data symbols one sync symbol follows: it
// carries no data, every tone sends the 4-QAM point of two bits of the
// pseudo-random sequence d(1..9) = 1, d(n) = d(n-4) ^ d(n-9), restarted for
// each sync symbol (the standard's pattern, assumed here).  Bits left over
// at the end of a symbol stay queued for the next one.
//
// Interface: no symbol leaves while tx_en is low (the tables are loaded
// first, as at the end of modem initialization) or while the order is
// being built; valid/ready byte input; output one tone per transfer with
// out_tone, out_x, out_y, out_last on the last tone of a symbol and
// out_sync during a sync symbol.  Table writes are taken at any time;
// writes of 1 bit or of more than cfg_bmax bits are refused and raise
// tbl_err for one cycle.  After reset every tone has 0 bits and the order is
// tone 1, 2, ... N_TONES-1.
module adsl_const_encoder #(
  parameter int unsigned N_TONES   = adsl_pkg::N_TONES,
  parameter int unsigned SF_FRAMES = adsl_pkg::SF_DATA_FRAMES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_en,      // start sending symbols
  input  logic [3:0]        cfg_bmax,
  input  logic              tbl_we,
  input  logic [6:0]        tbl_tone,
  input  logic [3:0]        tbl_bits,
  output logic              tbl_err,
  input  logic              ord_we,
  input  logic [6:0]        ord_pos,
  input  logic [6:0]        ord_tone,
  input  logic              ord_build,  // derive the order from the bit table
  output logic              ord_busy,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [6:0]        out_tone,
  output logic signed [8:0] out_x,
  output logic signed [8:0] out_y,
  output logic              out_last,
  output logic              out_sync
);
  localparam int unsigned NPOS = N_TONES - 1;   // positions per symbol

  logic [3:0]  bit_tbl [N_TONES];
  logic [6:0]  ord_tbl [NPOS];
  logic [6:0]  pos;
  logic [6:0]  sym_idx;                          // 0..SF_FRAMES, last is sync
  logic [23:0] q;                                // bit queue, oldest bit at q[0]
  logic [4:0]  qcnt;
  logic [8:0]  prbs;                             // d(n) .. d(n+8), d(n) at bit 0
  logic [6:0]  tone;
  logic [3:0]  b;
  logic        sync_sym;
  logic        take_byte;
  logic        xfer;
  logic [15:0] v;
  logic [7:0]  rev_in;
  logic [3:0]  bld_b;                            // bit count being collected
  logic [6:0]  bld_tone;                         // tone being examined
  logic [6:0]  bld_pos;                          // next order position

  assign sync_sym = (sym_idx == 7'(SF_FRAMES));
  assign tone     = sync_sym ? (pos + 7'd1) : ord_tbl[pos];
  assign b        = sync_sym ? 4'd2 : bit_tbl[tone];
  assign out_valid = tx_en && !ord_busy && (sync_sym || (qcnt >= {1'b0, b}));
  assign out_tone  = tone;
  assign out_last  = (pos == 7'(NPOS - 1));
  assign out_sync  = sync_sym;
  assign xfer      = out_valid && out_ready;
  assign v         = sync_sym ? {14'd0, prbs[1], prbs[0]} : {1'b0, q[14:0]};

  // Take a byte while the queue has room for it after this cycle's output.
  assign in_ready  = (qcnt <= 5'd16);
  assign take_byte = in_valid && in_ready;

  always_comb
    for (int i = 0; i < 8; i++) rev_in[i] = in_data[7-i];

  // Collect nb bits v[start], v[start+2], ... as a two's complement number
  // with an appended 1 as its LSB; the last collected bit is the sign.
  function automatic logic signed [8:0] qam_axis(logic [15:0] vv, int start, int nb);
    logic [8:0] r;
    r    = '0;
    r[0] = 1'b1;
    for (int i = 0; i < 8; i++)
      r[i+1] = (i < nb) ? vv[start + 2*i] : vv[start + 2*(nb-1)];
    return signed'(r);
  endfunction

  always_comb begin
    out_x = '0;
    out_y = '0;
    if (b != 4'd0) begin
      if (!b[0]) begin
        out_x = qam_axis(v, 1, int'(b) / 2);
        out_y = qam_axis(v, 0, int'(b) / 2);
      end else begin
        out_x = qam_axis(v, 0, (int'(b) + 1) / 2);
        out_y = qam_axis(v, 1, (int'(b) - 1) / 2);
      end
    end
  end

  // Bit queue: remove the bits of an output tone, append an accepted byte.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      qcnt <= '0;
    end else begin
      logic [23:0] nq;
      logic [4:0]  ncnt;
      nq   = q;
      ncnt = qcnt;
      if (xfer && !sync_sym) begin
        nq   = nq >> b;
        ncnt = ncnt - {1'b0, b};
      end
      if (take_byte) begin
        nq   = nq | (24'(rev_in) << ncnt);
        ncnt = ncnt + 5'd8;
      end
      q    <= nq;
      qcnt <= ncnt;
    end
  end

  // Position, symbol and sync-pattern sequencing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos     <= '0;
      sym_idx <= '0;
      prbs    <= '1;
    end else if (xfer) begin
      if (sync_sym) prbs <= {prbs[6] ^ prbs[1], prbs[5] ^ prbs[0], prbs[8:2]};  // two steps
      if (out_last) begin
        pos     <= '0;
        sym_idx <= sync_sym ? '0 : sym_idx + 7'd1;
        prbs    <= '1;
      end else begin
        pos <= pos + 7'd1;
      end
    end
  end

  // Tables.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_TONES); i++) bit_tbl[i] <= '0;
      for (int i = 0; i < int'(NPOS); i++)    ord_tbl[i] <= 7'(i + 1);
      tbl_err  <= 1'b0;
      ord_busy <= 1'b0;
      bld_b    <= '0;
      bld_tone <= 7'd1;
      bld_pos  <= '0;
    end else begin
      tbl_err <= 1'b0;
      if (tbl_we) begin
        if (tbl_bits == 4'd1 || tbl_bits > cfg_bmax || tbl_tone == '0) tbl_err <= 1'b1;
        else bit_tbl[tbl_tone] <= tbl_bits;
      end
      if (ord_busy) begin
        // counting pass: append every tone whose allocation equals bld_b
        if (bit_tbl[bld_tone] == bld_b) begin
          ord_tbl[bld_pos] <= bld_tone;
          bld_pos          <= bld_pos + 7'd1;
        end
        if (bld_tone == 7'(NPOS)) begin
          bld_tone <= 7'd1;
          bld_b    <= bld_b + 4'd1;
          if (bld_b == 4'd15) ord_busy <= 1'b0;
        end else begin
          bld_tone <= bld_tone + 7'd1;
        end
      end else if (ord_build) begin
        ord_busy <= 1'b1;
        bld_b    <= '0;
        bld_tone <= 7'd1;
        bld_pos  <= '0;
      end else if (ord_we && ord_pos < 7'(NPOS)) begin
        ord_tbl[ord_pos] <= ord_tone;
      end
    end
  end

endmodule
