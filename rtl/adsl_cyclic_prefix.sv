// adsl_cyclic_prefix: adds the cyclic prefix to each DMT symbol.
//
// A symbol of N samples (256) is stored as it arrives; then N + CP samples
// (272) are sent: the last CP (16) samples first, followed by all N in
// order.  The prefix absorbs the channel's impulse response so that the
// receiver sees a circular convolution.  Sizes follow the G.lite
// configuration; the single store-then-send buffer is this design's choice.
//
// Interface: valid/ready sample streams.  in_ready is high while a symbol
// is being collected; output starts the clock after the last input sample
// and lasts N + CP transfers.  out_first marks the first prefix sample,
// out_prefix every prefix sample, out_last the last sample.
module adsl_cyclic_prefix #(
  parameter int unsigned N  = adsl_pkg::N_FFT,
  parameter int unsigned CP = adsl_pkg::CP_LEN,
  parameter int unsigned DW = adsl_pkg::SAMPLE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data,
  output logic                 out_first,
  output logic                 out_prefix,
  output logic                 out_last
);
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned CW = $clog2(N + CP);

  logic signed [DW-1:0] buf_q [N];
  logic [AW-1:0]        wr_idx;
  logic [CW-1:0]        rd_cnt;
  logic                 sending;
  logic [AW-1:0]        rd_addr;

  // prefix reads N-CP .. N-1, then the body reads 0 .. N-1
  assign rd_addr    = (rd_cnt < CW'(CP)) ? AW'(rd_cnt + CW'(N - CP)) : AW'(rd_cnt - CW'(CP));
  assign in_ready   = !sending;
  assign out_valid  = sending;
  assign out_data   = buf_q[rd_addr];
  assign out_first  = (rd_cnt == '0);
  assign out_prefix = (rd_cnt < CW'(CP));
  assign out_last   = (rd_cnt == CW'(N + CP - 1));

  always_ff @(posedge clk)
    if (!sending && in_valid) buf_q[wr_idx] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_idx  <= '0;
      rd_cnt  <= '0;
      sending <= 1'b0;
    end else if (!sending) begin
      if (in_valid) begin
        wr_idx <= wr_idx + 1'b1;
        if (wr_idx == AW'(N - 1)) begin
          wr_idx  <= '0;
          sending <= 1'b1;
          rd_cnt  <= '0;
        end
      end
    end else if (out_ready) begin
      rd_cnt <= rd_cnt + 1'b1;
      if (out_last) sending <= 1'b0;
    end
  end

endmodule
