// register_file_tb: resets the registers, then applies random writes and
// reads against an array model; checks both read ports, the dedicated
// register-15 output, that a write lands only on the clock edge and that
// reset clears all registers.
module register_file_tb;
  logic        clk = 0, rst;
  logic [3:0]  ra, rb, wa;
  logic [31:0] rda, rdb, wd, outr;
  logic        we;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  register_file dut (.clk, .rst, .ra, .rb, .rdata_a(rda), .rdata_b(rdb),
                     .we, .wa, .wdata(wd), .out_reg(outr));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra = 0; rb = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    foreach (model[k]) model[k] = '0;
    for (int k = 0; k < 16; k++) begin
      ra = 4'(k); rb = 4'(15 - k); #1;
      check(rda, 32'd0, "reset a"); check(rdb, 32'd0, "reset b");
    end
    repeat (3000) begin
      we = ($urandom % 3) != 0; wa = 4'($urandom); wd = $urandom;
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      check(rda, model[ra], "read a before edge");
      check(rdb, model[rb], "read b before edge");
      check(outr, model[15], "out_reg");
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
      check(rda, model[ra], "read a after edge");
      check(rdb, model[rb], "read b after edge");
    end
    we = 0; rst = 1; @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 16; k++) begin ra = 4'(k); #1 check(rda, 32'd0, "re-reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
