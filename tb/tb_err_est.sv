// tb_err_est: error estimation and key output. Reference case: sifted key
// 00110100 (8 bits) with calibration bits 00 gives no errors and streams the
// six bits 110100. Then: one calibration error (50% > 11%: abandoned), fewer
// sifted bits than calibration bits, an empty key, a different threshold,
// and random cases against a reference model. Checks err_cnt, abandon, done,
// key_len, the streamed bits and the cycle count (min(num,CAL_BITS)+2 clocks
// of comparison, then one clock per key bit).
module tb_err_est;
  localparam int N = 15, CAL = 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] orig_key; logic [3:0] num; logic [CAL-1:0] bob_key;
  logic [1:0] err_cnt, err_cnt4; logic [3:0] key_len, key_len4;
  logic final_key, ldkey, busy, done, abandon;
  logic final_key4, ldkey4, busy4, done4, abort4;
  logic start4 = 0;

  err_est #(.N_SLOTS(N), .CAL_BITS(CAL), .ERR_THRESH_PCT(11)) dut (.*);
  // a second instance with a 60% threshold: one error in two bits (50%) passes
  err_est #(.N_SLOTS(N), .CAL_BITS(CAL), .ERR_THRESH_PCT(60)) dut60 (
    .clk, .rst_n, .start(start4), .orig_key, .num, .bob_key, .err_cnt(err_cnt4), .key_len(key_len4),
    .final_key(final_key4), .ldkey(ldkey4), .busy(busy4), .done(done4), .abandon(abort4));
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit got[$];
  always @(posedge clk) if (ldkey) got.push_back(final_key);

  task automatic run_case(input int thr = 11);
    int ncmp, nerr, t, exp_t; bit ab;
    ncmp = (num < CAL) ? num : CAL;
    nerr = 0;
    for (int i = 0; i < ncmp; i++) if (orig_key[i] != bob_key[i]) nerr++;
    ab = nerr * 100 > thr * ncmp;
    got.delete();
    @(negedge clk);
    if (thr == 11) start = 1; else start4 = 1;
    @(negedge clk); start = 0; start4 = 0;
    t = 1;
    while (!(thr == 11 ? done : done4)) begin @(negedge clk); t++; end
    exp_t = ncmp + 3 + (ab ? 0 : (int'(num) - ncmp) + 1);
    if (thr == 11) begin
      check(err_cnt == 2'(nerr), $sformatf("err_cnt %0d exp %0d", err_cnt, nerr));
      check(abandon == ab, $sformatf("abandon %0d exp %0d", abandon, ab));
      check(t == exp_t, $sformatf("took %0d clocks exp %0d", t, exp_t));
      check(got.size() == (ab ? 0 : int'(num) - ncmp), $sformatf("streamed %0d bits", got.size()));
      check(key_len == 4'(got.size()), "key_len");
      for (int i = 0; i < got.size(); i++) check(got[i] == orig_key[ncmp + i], "key bit");
    end else begin
      check(abort4 == ab && err_cnt4 == 2'(nerr), "60% threshold decision");
      check(key_len4 == 4'(ab ? 0 : int'(num) - ncmp), "60% threshold key length");
    end
    @(negedge clk);
    check(thr != 11 || (done && !busy), "done holds");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    orig_key = 15'b000000000101100; num = 8; bob_key = 2'b00;   // 00110100, slot 0 first
    run_case();
    check(got.size() == 6 && got[0] == 1 && got[1] == 1 && got[2] == 0 && got[3] == 1 && got[4] == 0 && got[5] == 0,
          "reference final key 110100");
    bob_key = 2'b10; run_case();          // one error in two: abandoned
    check(abandon, "abandoned at 50%");
    run_case(60);                          // accepted at a 60% threshold
    num = 1; bob_key = 2'b10; run_case(); // one bit compared, no error
    num = 1; bob_key = 2'b01; run_case(); // one bit compared, in error
    num = 0; run_case();
    for (int r = 0; r < 40; r++) begin
      orig_key = N'($urandom); num = 4'($urandom_range(15)); bob_key = 2'($urandom);
      if (num < 15) orig_key = orig_key & N'((1 << num) - 1);
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
