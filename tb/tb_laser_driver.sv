// tb_laser_driver: fires slots with each of the four laser codes and checks,
// clock by clock, that sync is high only in the first clock of the slot, that
// exactly the selected laser is on for PULSE_CYCLES clocks starting
// PULSE_OFFSET clocks in, that slot_done marks the last clock, that the slot
// lasts SLOT_CYCLES clocks, and that a fire during a slot is ignored.
module tb_laser_driver;
  localparam int SC = 8, PW = 2, PO = 3;
  logic clk = 0, rst_n = 0, fire = 0;
  logic [3:0] ld_code = 0, ld;
  logic sync, busy, slot_done;

  laser_driver #(.SLOT_CYCLES(SC), .PULSE_CYCLES(PW), .PULSE_OFFSET(PO)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ld == 0 && !sync && !busy, "quiet after reset");
    for (int s = 0; s < 4; s++) begin
      fire = 1; ld_code = 4'(1 << s);
      @(negedge clk);
      fire = 0; ld_code = 4'hF;      // must be latched, not followed
      for (int c = 0; c < SC; c++) begin
        if (c == 2) fire = 1;        // ignored while busy
        check(busy, "busy during slot");
        check(sync == (c == 0), $sformatf("sync at clock %0d", c));
        check(ld == ((c >= PO && c < PO + PW) ? 4'(1 << s) : 4'b0), $sformatf("ld %b at clock %0d", ld, c));
        check(slot_done == (c == SC - 1), $sformatf("slot_done at clock %0d", c));
        @(negedge clk);
        fire = 0;
      end
      check(!busy && ld == 0, "slot ended after SLOT_CYCLES");
      @(negedge clk);
    end
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
