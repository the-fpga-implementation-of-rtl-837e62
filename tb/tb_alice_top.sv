// tb_alice_top: the testbench plays Bob. It answers Alice's START, decodes the
// bit and basis of every laser pulse from the one-hot laser code, checks the
// slot period (SLOT_CYCLES+2 clocks), picks Bob's bases and detections, and
// reports them. It checks Alice's comparison result against its own sifting,
// returns calibration bits (correct, or with errors injected), and checks
// the error count, the accept/abandon decision at 11%, the final key stream
// and that Alice's state machine passes through its eight states in order.
module tb_alice_top;
  import bb84_pkg::*;
  localparam int N = 15, CAL = 2, CPB = 8, SC = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] ld; logic ld_sync, a_txd, b_txd;
  logic [2:0] state; logic [3:0] num; logic [1:0] err_cnt;
  logic final_key, ldkey, key_done, key_abort;
  logic b_txv = 0, b_txr, b_rxv;
  msg_t b_txm, b_rxm;

  alice_top #(.N_SLOTS(N), .CAL_BITS(CAL), .SLOT_CYCLES(SC), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .start, .ld, .ld_sync, .txd(a_txd), .rxd(b_txd),
    .cfg_we(1'b0), .cfg_ram(1'b0), .cfg_addr(1'b0), .cfg_data(4'h0),
    .state, .num, .err_cnt, .final_key, .ldkey, .key_done, .key_abort);
  rt_interface #(.CLKS_PER_BIT(CPB)) bob_link (.clk, .rst_n, .tx_valid(b_txv), .tx_msg(b_txm),
    .tx_ready(b_txr), .rx_valid(b_rxv), .rx_msg(b_rxm), .txd(b_txd), .rxd(a_txd));
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  msg_t rxq[$];
  bit   keyq[$];
  int   slot = -1;
  bit   a_bit[N], a_bas[N];
  longint cyc = 0, last_sync = 0;
  int   bad_period = 0, pulses = 0;
  logic [2:0] prev_state = 0;
  int   trans_ok = 1, seen[8];
  always @(negedge clk) begin
    cyc++;
    if (b_rxv) rxq.push_back(b_rxm);
    if (ldkey) keyq.push_back(final_key);
    if (ld_sync) begin
      if (slot >= 0 && cyc - last_sync != SC + 2) bad_period++;
      last_sync = cyc; slot++;
    end
    if (ld != 0 && slot >= 0 && slot < N) begin
      pulses++;
      check($onehot(ld), "one laser at a time");
      a_bit[slot] = ld[1] | ld[3]; a_bas[slot] = ld[2] | ld[3];
    end
    seen[state]++;
    if (state != prev_state && !(state == prev_state + 1 || (prev_state == 3'(A_MISEST) && state == 3'(A_IDLE))))
      trans_ok = 0;
    prev_state = state;
  end

  task automatic send(input msg_type_e t, input logic [15:0] d);
    @(negedge clk); b_txv = 1; b_txm = '{mtype: t, data: d};
    while (!b_txr) @(negedge clk);
    @(negedge clk); b_txv = 0;
  endtask
  task automatic recv(output msg_t m);
    while (rxq.size() == 0) @(negedge clk);
    m = rxq.pop_front();
  endtask

  initial begin
    msg_t m;
    logic [N-1:0] bb, bd, em;
    bit ka[$];
    int ncmp, nerr, flip, n_abort = 0, n_accept = 0;
    logic [15:0] cal;
    b_txm = '{mtype: MSG_START, data: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      repeat (20) @(negedge clk);
      slot = -1; keyq.delete(); pulses = 0;
      start = 1; repeat (4) @(negedge clk); start = 0;
      recv(m);
      check(m.mtype == MSG_START, "START message");
      while (state != 3'(A_PREC1)) @(negedge clk);
      check(pulses == N && slot == N - 1, $sformatf("%0d pulses in %0d slots", pulses, slot + 1));
      bb = N'($urandom); bd = (r == 0) ? '1 : N'($urandom | $urandom);
      send(MSG_BASES, 16'(bb));       // out of order on purpose
      send(MSG_DET, 16'(bd));
      em = '0; ka.delete();
      for (int s = 0; s < N; s++) if (bd[s] && bb[s] == a_bas[s]) begin em[s] = 1; ka.push_back(a_bit[s]); end
      recv(m);
      check(m.mtype == MSG_MATCH && m.data[N-1:0] == em, $sformatf("MATCH %h exp %h", m.data, em));
      flip = (r % 3 == 1) ? 1 : (r % 3 == 2) ? 3 : 0;   // none, first bit, both bits wrong
      cal = '0;
      for (int i = 0; i < CAL && i < ka.size(); i++) cal[i] = ka[i] ^ flip[i];
      ncmp = (ka.size() < CAL) ? ka.size() : CAL;
      nerr = 0;
      for (int i = 0; i < ncmp; i++) if (flip[i]) nerr++;
      send(MSG_CAL, cal);
      while (!(state == 3'(A_IDLE) && key_done)) @(negedge clk);
      check(num == 4'(ka.size()), "num");
      check(err_cnt == 2'(nerr), $sformatf("err_cnt %0d exp %0d", err_cnt, nerr));
      check(key_abort == (nerr * 100 > 11 * ncmp), "abandon decision");
      if (key_abort) n_abort++; else n_accept++;
      check(keyq.size() == (key_abort ? 0 : ka.size() - ncmp), $sformatf("key length %0d", keyq.size()));
      for (int i = 0; i < keyq.size(); i++) check(keyq[i] == ka[ncmp + i], "key bit");
    end
    check(bad_period == 0, $sformatf("%0d slots with a wrong period", bad_period));
    check(trans_ok == 1, "states visited in order");
    for (int s = 0; s < 8; s++) check(seen[s] > 0, $sformatf("state %0d visited", s));
    check(n_abort > 0 && n_accept > 0, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
