// tb_random_data: checks the random data memory against an independent model
// of the 16-bit LFSR (x^16+x^14+x^13+x^11+1, right-shifting Galois form):
// contents of both vectors, the read port, and the fill time (ready rises
// N_SLOTS+1 clocks after gen). Three rounds show that the generator carries on
// between rounds instead of repeating.
module tb_random_data;
  localparam int N = 15;
  logic clk = 0, rst_n = 0, gen = 0;
  logic busy, ready, rd_key, rd_basis;
  logic [3:0] rd_addr = 0;
  logic [N-1:0] ini_key, alphabet;

  random_data #(.N_SLOTS(N), .SEED(16'hACE1)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] model = 16'hACE1;
  function automatic logic [15:0] nxt(input logic [15:0] s);
    logic fb;
    fb = s[0];
    s = {1'b0, s[15:1]};
    if (fb) begin s[15] ^= 1; s[13] ^= 1; s[12] ^= 1; s[10] ^= 1; end
    return s;
  endfunction

  logic [N-1:0] ek, eb, prev_k;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!ready && !busy, "idle after reset");
    prev_k = '0;
    for (int r = 0; r < 3; r++) begin
      int t;
      for (int i = 0; i < N; i++) begin
        model = nxt(model); ek[i] = model[0];
        model = nxt(model); eb[i] = model[0];
      end
      gen = 1; @(negedge clk); gen = 0;
      t = 1;
      while (!ready) begin @(negedge clk); t++; end
      check(t == N + 1, $sformatf("fill took %0d clocks", t));
      check(ini_key == ek, $sformatf("ini_key %h exp %h", ini_key, ek));
      check(alphabet == eb, $sformatf("alphabet %h exp %h", alphabet, eb));
      for (int i = 0; i < N; i++) begin
        rd_addr = 4'(i); #1;
        check(rd_key == ek[i] && rd_basis == eb[i], "read port");
      end
      check(r == 0 || ini_key != prev_k, "new data each round");
      prev_k = ini_key;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
