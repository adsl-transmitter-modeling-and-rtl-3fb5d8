// adsl_framer: superframe builder with CRC insertion.
//
// User bytes are grouped into data frames of cfg_k bytes; SF_FRAMES data
// frames (68 by default) make one superframe.  The first byte of frame 0 of
// each superframe is not user data: it carries the 8-bit CRC of all user
// bytes of the previous superframe (zero for the very first superframe).
// The CRC covers user bytes only, not the CRC byte itself, which is this
// design's reading of "computed from the k message bits".  The sync frame
// that closes a superframe carries no bytes and is added later, by the
// constellation encoder.
//
// Interface: valid/ready byte streams on both sides.  The path is
// combinational (no added latency); during the CRC slot the input is held
// (in_ready low) while the CRC byte is offered on the output.  out_crc
// marks the CRC byte, out_frame_start the first byte of every data frame.
// cfg_k must be at least 1 and stay constant while data flows.
module adsl_framer #(
  parameter int unsigned SF_FRAMES = adsl_pkg::SF_DATA_FRAMES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] cfg_k,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       out_crc,
  output logic       out_frame_start
);
  logic [7:0] byte_idx;
  logic [7:0] frame_idx;
  logic [7:0] crc;
  logic       crc_slot;
  logic       xfer;

  assign crc_slot        = (frame_idx == '0) && (byte_idx == '0);
  assign out_valid       = crc_slot ? 1'b1 : in_valid;
  assign in_ready        = crc_slot ? 1'b0 : out_ready;
  assign out_data        = crc_slot ? crc : in_data;
  assign out_crc         = crc_slot;
  assign out_frame_start = (byte_idx == '0);
  assign xfer            = out_valid && out_ready;

  adsl_crc8 u_crc (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(xfer && crc_slot),
    .en   (xfer && !crc_slot),
    .data (in_data),
    .crc  (crc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byte_idx  <= '0;
      frame_idx <= '0;
    end else if (xfer) begin
      if (byte_idx == cfg_k - 8'd1) begin
        byte_idx  <= '0;
        frame_idx <= (frame_idx == 8'(SF_FRAMES - 1)) ? '0 : frame_idx + 8'd1;
      end else begin
        byte_idx <= byte_idx + 8'd1;
      end
    end
  end

endmodule
