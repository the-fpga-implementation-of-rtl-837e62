// tb_bb84_qkd: end-to-end test of the BB84 system at its default parameters.
// Alice and Bob are joined by the optical channel model and by a crossed
// serial link. For every slot the testbench records, from the ports alone,
// the bit and basis Alice sent (decoded from the laser code), Bob's analyser
// basis at the pulse and Bob's detector clicks. From these it computes the
// sifted key each side should hold, the number of sifted bits, the errors in
// the first CAL_BITS bits and the accept/abandon decision, and checks the key
// streams and status outputs of both sides against them. Rounds: lossy
// error-free channels (key accepted), a channel that flips every photon
// (key abandoned) and a moderately noisy one. It counts each of Alice's eight
// states, lost photons, basis mismatches, accepted and abandoned keys.
module tb_bb84_qkd;
  import bb84_pkg::*;
  localparam int N = 15, CAL = 2, THR = 11;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] ld; logic ld_sync, a_txd, b_txd, basis_sel, bob_sync;
  logic [1:0] det;
  logic [2:0] a_state, b_state;
  logic [3:0] a_num, b_num; logic [1:0] a_err;
  logic a_key, a_ld, a_done, a_abort, b_key, b_ld, b_done;
  int loss_pct = 0, err_pct = 0;

  bb84_qkd dut (
    .clk, .rst_n, .start, .ld, .ld_sync, .alice_txd(a_txd), .alice_rxd(b_txd),
    .cfg_we(1'b0), .cfg_ram(1'b0), .cfg_addr(1'b0), .cfg_data(4'h0),
    .alice_state(a_state), .alice_num(a_num), .alice_err_cnt(a_err), .alice_final_key(a_key),
    .alice_ldkey(a_ld), .alice_done(a_done), .alice_abort(a_abort),
    .bob_sync, .det, .basis_sel, .bob_txd(b_txd), .bob_rxd(a_txd), .bob_state(b_state),
    .bob_num(b_num), .bob_final_key(b_key), .bob_ldkey(b_ld), .bob_done(b_done)
  );
  qchannel_model ch (.clk, .ld, .ld_sync, .basis_sel, .loss_pct, .err_pct, .det, .bob_sync);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // per-slot observation
  int  slot = -1;
  bit  a_bit[N], a_bas[N], b_bas[N], c0[N], c1[N];
  bit  qa[$], qb[$];
  always @(negedge clk) begin
    if (ld_sync) slot++;
    #1;   // after the channel model has updated det
    if (ld != 0 && slot >= 0 && slot < N) begin
      a_bit[slot] = ld[1] | ld[3];
      a_bas[slot] = ld[2] | ld[3];
      b_bas[slot] = basis_sel;
    end
    if (slot >= 0 && slot < N) begin
      if (det[0]) c0[slot] = 1;
      if (det[1]) c1[slot] = 1;
    end
    if (a_ld) qa.push_back(a_key);
    if (b_ld) qb.push_back(b_key);
  end

  int seen_state[8];
  always @(posedge clk) seen_state[a_state]++;

  int n_lost = 0, n_mismatch = 0, n_accept = 0, n_abort = 0, n_errs = 0;

  task automatic run_round(input int loss, input int err);
    bit  ka[$], kb[$];
    int  nerr, ncmp;
    bit  exp_abort;
    loss_pct = loss; err_pct = err;
    slot = -1; qa.delete(); qb.delete();
    for (int i = 0; i < N; i++) begin c0[i] = 0; c1[i] = 0; end
    @(negedge clk) start = 1;
    repeat (5) @(negedge clk);
    start = 0;
    wait (a_state == 3'(A_MISEST));
    wait (a_state == 3'(A_IDLE) && b_done);
    repeat (5) @(posedge clk);
    // reference sifting
    for (int i = 0; i < N; i++) begin
      if ((c0[i] ^ c1[i]) == 0) n_lost++;
      else if (a_bas[i] != b_bas[i]) n_mismatch++;
      else begin ka.push_back(a_bit[i]); kb.push_back(c1[i]); end
    end
    check(a_num == 4'(ka.size()), $sformatf("alice num %0d exp %0d", a_num, ka.size()));
    check(b_num == 4'(ka.size()), $sformatf("bob num %0d exp %0d", b_num, ka.size()));
    ncmp = (ka.size() < CAL) ? ka.size() : CAL;
    nerr = 0;
    for (int i = 0; i < ncmp; i++) if (ka[i] != kb[i]) nerr++;
    exp_abort = (nerr * 100 > THR * ncmp);
    if (nerr > 0) n_errs++;
    check(a_err == 2'(nerr), $sformatf("err_cnt %0d exp %0d", a_err, nerr));
    check(a_done, "alice done");
    check(a_abort == exp_abort, $sformatf("abort %0d exp %0d", a_abort, exp_abort));
    if (exp_abort) begin
      n_abort++;
      check(qa.size() == 0, "no key streamed after abort");
    end else begin
      n_accept++;
      check(qa.size() == ka.size() - ncmp, $sformatf("alice key length %0d exp %0d", qa.size(), ka.size() - ncmp));
      for (int i = ncmp; i < ka.size() && i - ncmp < qa.size(); i++) check(qa[i-ncmp] == ka[i], "alice key bit");
    end
    check(qb.size() == kb.size() - ncmp, $sformatf("bob key length %0d exp %0d", qb.size(), kb.size() - ncmp));
    for (int i = ncmp; i < kb.size() && i - ncmp < qb.size(); i++) check(qb[i-ncmp] == kb[i], "bob key bit");
    if (err == 0 && !exp_abort) for (int i = 0; i < qa.size() && i < qb.size(); i++) check(qa[i] == qb[i], "keys agree");
    $display("round loss=%0d err=%0d: sifted %0d, cal errors %0d, abort %0d, key %0d bits",
             loss, err, ka.size(), nerr, a_abort, qa.size());
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    run_round(20, 0);
    run_round(0, 0);
    run_round(10, 100);
    run_round(30, 30);
    run_round(0, 100);
    for (int s = 0; s < 8; s++) check(seen_state[s] > 0, $sformatf("alice state %0d visited", s));
    check(n_lost > 0, "lost photon seen");
    check(n_mismatch > 0, "basis mismatch seen");
    check(n_accept > 0, "key accepted");
    check(n_abort > 0, "key abandoned");
    check(n_errs > 0, "calibration error seen");
    $display("mechanisms: lost=%0d mismatch=%0d accept=%0d abort=%0d err_rounds=%0d",
             n_lost, n_mismatch, n_accept, n_abort, n_errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
