// tb_rt_interface: two interfaces joined by crossed serial lines exchange
// random messages in both directions at once; each is checked for content and
// for arriving 30*CLKS_PER_BIT clocks (give or take a few for synchronisation)
// after it was accepted. A third interface's receiver is driven bit by bit by
// the testbench: a byte with a low stop bit must drop the partial message, and
// the following well-formed message must arrive intact.
module tb_rt_interface;
  import bb84_pkg::*;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0;
  logic a_txv = 0, a_txr, a_rxv, b_txv = 0, b_txr, b_rxv, a_txd, b_txd;
  msg_t a_txm, b_txm, a_rxm, b_rxm;
  logic c_txr, c_rxv, c_txd, c_rxd = 1;
  msg_t c_rxm;

  rt_interface #(.CLKS_PER_BIT(CPB)) ua (.clk, .rst_n, .tx_valid(a_txv), .tx_msg(a_txm), .tx_ready(a_txr),
    .rx_valid(a_rxv), .rx_msg(a_rxm), .txd(a_txd), .rxd(b_txd));
  rt_interface #(.CLKS_PER_BIT(CPB)) ub (.clk, .rst_n, .tx_valid(b_txv), .tx_msg(b_txm), .tx_ready(b_txr),
    .rx_valid(b_rxv), .rx_msg(b_rxm), .txd(b_txd), .rxd(a_txd));
  rt_interface #(.CLKS_PER_BIT(CPB)) uc (.clk, .rst_n, .tx_valid(1'b0), .tx_msg(a_txm), .tx_ready(c_txr),
    .rx_valid(c_rxv), .rx_msg(c_rxm), .txd(c_txd), .rxd(c_rxd));
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  msg_t qa[$], qb[$];
  longint ta[$], tb_[$];
  longint cyc = 0;
  always @(posedge clk) cyc++;
  int got_a = 0, got_b = 0, got_c = 0;
  msg_t last_c;

  always @(negedge clk) begin
    if (b_rxv) begin            // sent by a
      msg_t m; longint t;
      m = qa.pop_front(); t = ta.pop_front();
      check(b_rxm == m, $sformatf("a->b message %h exp %h", b_rxm, m));
      check(cyc - t >= 29 * CPB && cyc - t <= 30 * CPB + 8, $sformatf("a->b latency %0d", cyc - t));
      got_b++;
    end
    if (a_rxv) begin
      msg_t m; longint t;
      m = qb.pop_front(); t = tb_.pop_front();
      check(a_rxm == m, $sformatf("b->a message %h exp %h", a_rxm, m));
      check(cyc - t >= 29 * CPB && cyc - t <= 30 * CPB + 8, $sformatf("b->a latency %0d", cyc - t));
      got_a++;
    end
    if (c_rxv) begin got_c++; last_c = c_rxm; end
  end

  function automatic msg_t rnd_msg();
    msg_t m;
    m.mtype = msg_type_e'(8'($urandom_range(1, 5)));
    m.data  = 16'($urandom);
    return m;
  endfunction

  task automatic sender_a(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); a_txv = 1; a_txm = rnd_msg();
      while (!a_txr) @(negedge clk);
      qa.push_back(a_txm); ta.push_back(cyc);
      @(negedge clk); a_txv = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
  endtask
  task automatic sender_b(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); b_txv = 1; b_txm = rnd_msg();
      while (!b_txr) @(negedge clk);
      qb.push_back(b_txm); tb_.push_back(cyc);
      @(negedge clk); b_txv = 0;
      repeat ($urandom_range(40)) @(negedge clk);
    end
  endtask

  task automatic ser_byte(input logic [7:0] b, input bit stop);
    c_rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin c_rxd = b[i]; repeat (CPB) @(negedge clk); end
    c_rxd = stop; repeat (CPB) @(negedge clk);
    c_rxd = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  initial begin
    a_txm = '{mtype: MSG_START, data: '0}; b_txm = a_txm;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    fork sender_a(12); sender_b(12); join
    repeat (40 * CPB) @(negedge clk);
    check(got_a == 12 && got_b == 12, $sformatf("received %0d/%0d messages", got_a, got_b));
    // framing error in the middle of a message
    ser_byte(8'h04, 1); ser_byte(8'h33, 0);
    ser_byte(8'h02, 1); ser_byte(8'hCD, 1); ser_byte(8'h2B, 1);
    repeat (4 * CPB) @(negedge clk);
    check(got_c == 1, $sformatf("%0d messages after framing error", got_c));
    check(last_c.mtype == MSG_DET && last_c.data == 16'h2BCD, $sformatf("message after framing error %h", last_c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
