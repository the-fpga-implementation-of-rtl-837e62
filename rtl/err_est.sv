// err_est: error rate estimation and final key output.
//
// After a pulse on start the module compares the first CAL_BITS bits of
// Alice's sifted key orig_key with Bob's calibration bits bob_key, one bit per
// clock (only the first min(num, CAL_BITS) bits if fewer were sifted), and
// counts the differences in err_cnt. If err_cnt*100 > ERR_THRESH_PCT * compared
// the key is abandoned: abandon and done rise together. Otherwise the remaining
// sifted bits orig_key[CAL_BITS .. num-1], which were not disclosed, are sent
// out one per clock on final_key with ldkey high, and then done rises. done and
// abandon hold until the next start; key_len gives the number of bits streamed.
// The 11% abandon rule is the protocol's; disclosing the leading CAL_BITS bits
// (two in the reference simulation) and discarding them is this design's reading.
module err_est #(
  parameter int unsigned N_SLOTS        = 15,
  parameter int unsigned CAL_BITS       = 2,
  parameter int unsigned ERR_THRESH_PCT = 11
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [N_SLOTS-1:0]           orig_key,
  input  logic [$clog2(N_SLOTS+1)-1:0] num,
  input  logic [CAL_BITS-1:0]          bob_key,
  output logic [$clog2(CAL_BITS+1)-1:0] err_cnt,
  output logic [$clog2(N_SLOTS+1)-1:0] key_len,
  output logic                         final_key,
  output logic                         ldkey,
  output logic                         busy,
  output logic                         done,
  output logic                         abandon
);
  localparam int unsigned NW = $clog2(N_SLOTS + 1);

  typedef enum logic [1:0] {E_IDLE, E_CMP, E_JUDGE, E_OUT} est_state_e;
  est_state_e    st;
  logic [NW-1:0] k;      // bit index into orig_key
  logic [NW-1:0] n_cmp;  // bits compared = min(num, CAL_BITS)
  logic [N_SLOTS-1:0] cal_ext;

  assign cal_ext = N_SLOTS'(bob_key);

  assign busy = (st != E_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= E_IDLE;
      k         <= '0;
      n_cmp     <= '0;
      err_cnt   <= '0;
      key_len   <= '0;
      final_key <= 1'b0;
      ldkey     <= 1'b0;
      done      <= 1'b0;
      abandon     <= 1'b0;
    end else begin
      ldkey <= 1'b0;
      unique case (st)
        E_IDLE: if (start) begin
          k       <= '0;
          err_cnt <= '0;
          key_len <= '0;
          done    <= 1'b0;
          abandon   <= 1'b0;
          n_cmp   <= (num < NW'(CAL_BITS)) ? num : NW'(CAL_BITS);
          st      <= E_CMP;
        end
        E_CMP: begin
          if (k < n_cmp) begin
            if (orig_key[k] != cal_ext[k]) err_cnt <= err_cnt + 1'b1;
            k <= k + 1'b1;
          end else begin
            st <= E_JUDGE;
          end
        end
        E_JUDGE: begin
          if (32'(err_cnt) * 100 > 32'(ERR_THRESH_PCT) * 32'(n_cmp)) begin
            abandon <= 1'b1;
            done  <= 1'b1;
            st    <= E_IDLE;
          end else begin
            k  <= NW'(CAL_BITS);
            st <= E_OUT;
          end
        end
        E_OUT: begin
          if (k < num) begin
            final_key <= orig_key[k];
            ldkey     <= 1'b1;
            key_len   <= key_len + 1'b1;
            k         <= k + 1'b1;
          end else begin
            done <= 1'b1;
            st   <= E_IDLE;
          end
        end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
