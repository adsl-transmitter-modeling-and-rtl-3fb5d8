// tb_adsl_framer: checks superframe construction and CRC placement.
//
// With 3 frames of 5 bytes per superframe (parameters reduced for speed)
// random user bytes are pushed with random valid gaps and random output
// back-pressure.  The output must be, per superframe, the CRC of the
// previous superframe's user bytes (0 for the first) followed by the user
// bytes; out_crc must mark exactly that byte and out_frame_start the first
// byte of every frame.  The number of CRC slots is counted.
module tb_adsl_framer;
  import tb_adsl_ref_pkg::*;

  localparam int SF = 3;
  localparam int K  = 5;
  localparam int NSF = 6;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] cfg_k = 8'(K);
  logic       in_valid = 1'b0, in_ready;
  logic [7:0] in_data = '0;
  logic       out_valid, out_ready = 1'b0;
  logic [7:0] out_data;
  logic       out_crc, out_frame_start;
  int checks = 0, failures = 0, crc_slots = 0, stalls = 0;
  bq_t user_bytes, expected;
  int ocount = 0;

  adsl_framer #(.SF_FRAMES(SF)) dut (.*);

  always #5 clk = ~clk;

  // expected output stream
  initial begin
    int u;
    u = 0;
    for (int i = 0; i < NSF*SF*K - NSF; i++) user_bytes.push_back(8'($urandom));
    for (int s = 0; s < NSF; s++) begin
      bq_t prev;
      prev.delete();
      if (s > 0) for (int i = 0; i < SF*K - 1; i++) prev.push_back(user_bytes[(s-1)*(SF*K-1) + i]);
      expected.push_back(s == 0 ? 8'd0 : ref_crc8(prev));
      for (int i = 0; i < SF*K - 1; i++) expected.push_back(user_bytes[u++]);
    end
  end

  // driver
  initial begin
    int k;
    k = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (k < user_bytes.size()) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = user_bytes[k];
      @(posedge clk);
      if (in_valid && in_ready) k++;
      #1;
    end
    in_valid = 1'b0;
  end

  // monitor
  always @(negedge clk) out_ready <= ($urandom_range(0, 4) != 0);
  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      checks += 3;
      if (out_data !== expected[ocount]) begin
        failures++;
        $display("FAIL byte %0d: %02h expected %02h", ocount, out_data, expected[ocount]);
      end
      if (out_crc !== (ocount % (SF*K) == 0)) begin
        failures++;
        $display("FAIL out_crc at byte %0d", ocount);
      end
      if (out_frame_start !== (ocount % K == 0)) begin
        failures++;
        $display("FAIL out_frame_start at byte %0d", ocount);
      end
      if (out_crc) crc_slots++;
      ocount++;
      if (ocount == expected.size()) begin
        checks++;
        if (crc_slots != NSF || stalls == 0) begin
          failures++;
          $display("FAIL crc slots %0d stalls %0d", crc_slots, stalls);
        end
        $display("crc slots %0d, output stalls %0d", crc_slots, stalls);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog after %0d bytes", ocount);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
