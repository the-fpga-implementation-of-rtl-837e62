// tb_sifter: first the reference case of 15 slots (written slot 0 first):
// Alice's bases 010010111001001, Bob's 011011010111000, initial key
// 000111101011001, all slots detected, which sifts to the eight bits 00110100
// with the last kept slot 13. Then random cases, with random detection masks,
// against a reference model. Checks orig_key, num, match, addr and that done
// comes N_SLOTS+1 clocks after start.
module tb_sifter;
  localparam int N = 15;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] alice_alphabet, bob_alphabet, valid, ini_key, orig_key, match;
  logic [3:0] num, addr;
  logic busy, done;

  sifter #(.N_SLOTS(N)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [N-1:0] from_str(input string s);   // s[0] is slot 0
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  task automatic run_case();
    logic [N-1:0] ek, em; int en, ea, t;
    ek = '0; em = '0; en = 0; ea = 0;
    for (int i = 0; i < N; i++)
      if (valid[i] && alice_alphabet[i] == bob_alphabet[i]) begin
        ek[en] = ini_key[i]; em[i] = 1; en++; ea = i;
      end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    check(t == N + 1, $sformatf("sifting took %0d clocks", t));
    check(orig_key == ek, $sformatf("orig_key %b exp %b", orig_key, ek));
    check(num == 4'(en), $sformatf("num %0d exp %0d", num, en));
    check(match == em, "match mask");
    check(en == 0 || addr == 4'(ea), $sformatf("addr %0d exp %0d", addr, ea));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    alice_alphabet = from_str("010010111001001");
    bob_alphabet   = from_str("011011010111000");
    ini_key        = from_str("000111101011001");
    valid          = '1;
    run_case();
    check(orig_key[7:0] == 8'b00101100, "reference key 00110100 (slot order)");
    check(num == 4'd8 && addr == 4'd13, "reference num 8, addr 13");
    for (int r = 0; r < 40; r++) begin
      alice_alphabet = N'($urandom); bob_alphabet = N'($urandom);
      ini_key = N'($urandom); valid = (r % 4 == 0) ? '1 : N'($urandom | $urandom);
      run_case();
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
