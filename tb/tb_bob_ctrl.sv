// tb_bob_ctrl: the testbench plays Alice. Through its own classical-channel
// interface it sends START, then emits N_SLOTS slots of sync pulses and, per
// slot, a photon of random bit and basis that Bob's detectors see as: lost,
// a double click, or a click that is correct when Bob's analyser basis matches
// and random otherwise. It checks Bob's detected-slot report and his basis
// report against what it observed, answers with the match mask, then checks
// the calibration bits, the number of sifted bits and the key stream.
module tb_bob_ctrl;
  import bb84_pkg::*;
  localparam int N = 15, CAL = 2, CPB = 8, W = 6;
  logic clk = 0, rst_n = 0, sync = 0, basis_sel;
  logic [1:0] det = 0;
  logic b_txd, a_txd;
  logic [2:0] state; logic [3:0] num;
  logic final_key, ldkey, key_done;
  logic a_txv = 0, a_txr, a_rxv;
  msg_t a_txm, a_rxm;

  bob_ctrl #(.N_SLOTS(N), .CAL_BITS(CAL), .WINDOW_CYCLES(W), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .sync, .det, .basis_sel, .txd(b_txd), .rxd(a_txd), .state, .num,
    .final_key, .ldkey, .key_done);
  rt_interface #(.CLKS_PER_BIT(CPB)) alice_link (.clk, .rst_n, .tx_valid(a_txv), .tx_msg(a_txm),
    .tx_ready(a_txr), .rx_valid(a_rxv), .rx_msg(a_rxm), .txd(a_txd), .rxd(b_txd));
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  msg_t rxq[$];
  bit   keyq[$];
  always @(negedge clk) begin
    if (a_rxv) rxq.push_back(a_rxm);
    if (ldkey) keyq.push_back(final_key);
  end

  task automatic send(input msg_type_e t, input logic [15:0] d);
    @(negedge clk); a_txv = 1; a_txm = '{mtype: t, data: d};
    while (!a_txr) @(negedge clk);
    @(negedge clk); a_txv = 0;
  endtask

  task automatic recv(output msg_t m);
    while (rxq.size() == 0) @(negedge clk);
    m = rxq.pop_front();
  endtask

  initial begin
    msg_t m;
    bit a_bit[N], a_bas[N], b_bas[N], b_bit[N];
    logic [N-1:0] ed, eb, mm;
    bit kb[$];
    int kind;
    a_txm = '{mtype: MSG_START, data: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      while (state != 3'(B_IDLE)) @(negedge clk);
      keyq.delete();
      send(MSG_START, 16'h0);
      while (state != 3'(B_MEAS)) @(negedge clk);   // START delivered
      repeat (4) @(negedge clk);                     // arm reaches bob_measure
      for (int s = 0; s < N; s++) begin
        a_bit[s] = 1'($urandom); a_bas[s] = 1'($urandom);
        kind = $urandom_range(9);        // 0: lost, 1: double click, else a photon
        if (r == 0) kind = 5;
        b_bas[s] = basis_sel;
        ed[s] = (kind >= 2);
        b_bit[s] = (basis_sel == a_bas[s]) ? a_bit[s] : 1'($urandom);
        for (int c = 0; c < 11; c++) begin
          sync = (c == 0);
          det  = 2'b00;
          if (c == 2 && kind == 1) det = 2'b11;
          if (c == 2 && kind >= 2) det = b_bit[s] ? 2'b10 : 2'b01;
          @(negedge clk);
        end
        eb[s] = b_bas[s];
      end
      sync = 0; det = 0;
      recv(m);
      check(m.mtype == MSG_DET && m.data[N-1:0] == ed, $sformatf("DET %h exp %h", m.data, ed));
      recv(m);
      check(m.mtype == MSG_BASES && m.data[N-1:0] == eb, $sformatf("BASES %h exp %h", m.data, eb));
      mm = '0; kb.delete();
      for (int s = 0; s < N; s++) if (ed[s] && a_bas[s] == eb[s]) begin mm[s] = 1; kb.push_back(b_bit[s]); end
      send(MSG_MATCH, 16'(mm));
      recv(m);
      check(m.mtype == MSG_CAL, "CAL message type");
      for (int i = 0; i < CAL && i < kb.size(); i++) check(m.data[i] == kb[i], "calibration bit");
      while (!key_done) @(negedge clk);
      check(num == 4'(kb.size()), $sformatf("num %0d exp %0d", num, kb.size()));
      check(keyq.size() == ((kb.size() > CAL) ? kb.size() - CAL : 0), $sformatf("key length %0d", keyq.size()));
      for (int i = CAL; i < kb.size() && i - CAL < keyq.size(); i++) check(keyq[i - CAL] == kb[i], "key bit");
    end
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
