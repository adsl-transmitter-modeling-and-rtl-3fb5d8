// tb_adsl_cyclic_prefix: checks 256-in / 272-out cyclic prefix insertion.
//
// Four symbols of random samples go in with random gaps and the output is
// randomly stalled.  Each symbol must come out as samples 240..255 followed
// by 0..255, with out_first on the first sample, out_prefix on the first
// 16 and out_last on the 272nd.  With no stalls, the prefix must start the
// clock after the last input sample and the symbol must take 272 clocks.
module tb_adsl_cyclic_prefix;
  localparam int N = 256, CP = 16;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               in_valid = 1'b0, in_ready;
  logic signed [17:0] in_data = '0;
  logic               out_valid, out_ready = 1'b0;
  logic signed [17:0] out_data;
  logic               out_first, out_prefix, out_last;
  int checks = 0, failures = 0;

  adsl_cyclic_prefix dut (.*);

  always #5 clk = ~clk;

  task automatic run_symbol(bit pressure);
    logic signed [17:0] s[N];
    int n, k, cyc;
    foreach (s[i]) s[i] = 18'($urandom);
    for (int i = 0; i < N; i++) begin
      in_valid = !pressure || ($urandom_range(0, 3) != 0);
      in_data  = s[i];
      @(posedge clk);
      if (!(in_valid && in_ready)) i--;
      @(negedge clk);
    end
    in_valid = 1'b0;
    n = 0; cyc = 0;
    while (n < N + CP) begin
      out_ready = !pressure || ($urandom_range(0, 3) != 0);
      @(posedge clk);
      cyc++;
      if (n == 0 && !out_valid) begin
        checks++; failures++;
        $display("FAIL output not ready after the last input sample");
      end
      if (out_valid && out_ready) begin
        k = (n < CP) ? N - CP + n : n - CP;
        checks++;
        if (out_data !== s[k] || out_first !== (n == 0) || out_prefix !== (n < CP) ||
            out_last !== (n == N + CP - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d: %0d expected %0d", n, out_data, s[k]);
        end
        n++;
      end
      @(negedge clk);
    end
    out_ready = 1'b0;
    if (!pressure) begin
      checks++;
      if (cyc != N + CP) begin
        failures++;
        $display("FAIL symbol took %0d clocks", cyc);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_symbol(1'b0);
    run_symbol(1'b1);
    run_symbol(1'b1);
    run_symbol(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
