// tb_pol_encoder: checks the RAM0/RAM1 polarisation mapping. With the reset
// contents, bit 0 gives H (rectilinear) or +45 (diagonal) and bit 1 gives V or
// -45; the code appears exactly one clock after in_valid. It then rewrites the
// RAMs through the configuration port and checks the new mapping, and that the
// output holds when in_valid is low.
module tb_pol_encoder;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_bit = 0, in_basis = 0, out_valid;
  logic [3:0] ld_code;
  logic cfg_we = 0, cfg_ram = 0, cfg_addr = 0;
  logic [3:0] cfg_data = 0;

  pol_encoder dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] tbl [2][2];   // [bit][basis]

  task automatic enc(input bit b, input bit bas);
    in_valid = 1; in_bit = b; in_basis = bas;
    @(negedge clk);
    in_valid = 0;
    check(out_valid, "out_valid one clock after in_valid");
    check(ld_code == tbl[b][bas], $sformatf("bit %0d basis %0d -> %b exp %b", b, bas, ld_code, tbl[b][bas]));
    @(negedge clk);
    check(!out_valid, "out_valid is a single pulse");
    check(ld_code == tbl[b][bas], "code held");
  endtask

  initial begin
    tbl[0][0] = 4'b0001; tbl[0][1] = 4'b0100; tbl[1][0] = 4'b0010; tbl[1][1] = 4'b1000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < 2; b++) for (int s = 0; s < 2; s++) enc(b[0], s[0]);
    // swap the diagonal codes and move rectilinear-0 to V
    tbl[0][1] = 4'b1000; tbl[1][1] = 4'b0100; tbl[0][0] = 4'b0010;
    for (int b = 0; b < 2; b++) begin
      cfg_we = 1; cfg_ram = b[0]; cfg_addr = 1; cfg_data = tbl[b][1];
      @(negedge clk);
    end
    cfg_ram = 0; cfg_addr = 0; cfg_data = tbl[0][0];
    @(negedge clk);
    cfg_we = 0;
    for (int b = 0; b < 2; b++) for (int s = 0; s < 2; s++) enc(b[0], s[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
