// tb_bob_measure: drives N_SLOTS slots of sync pulses with a random click
// pattern per slot (none, detector 0, detector 1, both) at a random position
// inside the detection window, and checks that basis_sel shows the basis of
// the current slot, that detected and raw_key record single clicks only,
// that clicks outside the window are ignored and that done pulses after the
// last slot.
module tb_bob_measure;
  localparam int N = 15, W = 6, PERIOD = 11;
  logic clk = 0, rst_n = 0, arm = 0, sync = 0;
  logic [1:0] det = 0;
  logic [N-1:0] bases, raw_key, detected;
  logic basis_sel, busy, done;

  bob_measure #(.N_SLOTS(N), .WINDOW_CYCLES(W)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [N-1:0] ek, ed;
    int pat, pos; bit saw_done;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      bases = N'($urandom);
      @(negedge clk); arm = 1; @(negedge clk); arm = 0;
      saw_done = 0;
      for (int s = 0; s < N; s++) begin
        pat = $urandom_range(3); pos = $urandom_range(W);
        if (r == 0) pat = s % 4;
        ed[s] = (pat == 1 || pat == 2); ek[s] = (pat == 2);
        check(basis_sel == bases[s], $sformatf("basis_sel slot %0d", s));
        for (int c = 0; c < PERIOD; c++) begin
          sync = (c == 0);
          det  = (c == pos) ? 2'(pat) : 2'b00;
          if (c == W + 2) det = 2'b11;       // outside the window: ignored
          @(negedge clk);
          if (done) saw_done = 1;
        end
      end
      sync = 0; det = 0;
      @(negedge clk);
      check(saw_done, "done after last slot");
      check(!busy, "idle after last slot");
      check(detected == ed, $sformatf("detected %b exp %b", detected, ed));
      check((raw_key & ed) == (ek & ed), $sformatf("raw_key %b exp %b", raw_key & ed, ek & ed));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
