// program_rom_tb: loads the default program image and checks every word of
// the 256-word ROM (the ten Fibonacci instructions, zeros after them) and
// the one-cycle read latency.
module program_rom_tb;
  logic        clk = 0;
  logic [7:0]  addr;
  logic [15:0] data;
  logic [15:0] exp [256];
  int checks = 0, failures = 0;

  program_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (exp[k]) exp[k] = '0;
    exp[0] = 16'h2000; exp[1] = 16'h2201; exp[2] = 16'h2400; exp[3] = 16'h01E0;
    exp[4] = 16'h4020; exp[5] = 16'h6800; exp[6] = 16'h0200; exp[7] = 16'h0820;
    exp[8] = 16'hA403; exp[9] = 16'hE000;
    for (int k = 0; k < 256; k++) begin
      addr = 8'(k);
      @(posedge clk); #1;
      checks++;
      if (data !== exp[k]) begin
        failures++;
        $display("FAIL word %0d: got %h exp %h", k, data, exp[k]);
      end
    end
    // latency: changing the address alone must not change the output
    addr = 8'd0; @(posedge clk); #1;
    addr = 8'd1; #1;
    checks++;
    if (data !== exp[0]) begin failures++; $display("FAIL read is not registered"); end
    @(posedge clk); #1;
    checks++;
    if (data !== exp[1]) begin failures++; $display("FAIL read after edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
