// bob_ctrl: Bob's QKD control module.
//
// Bob's round, driven by messages from Alice over the classical channel:
//   GEN        draw N_SLOTS random bases (random_data, own seed) ahead of time
//   IDLE       wait for Alice's START; then arm the measure module
//   MEAS       bob_measure records bit, detection and basis for every slot
//   SEND_DET   report the slots in which a photon was detected
//   SEND_BASES report the bases used
//   WAIT_MATCH wait for Alice's comparison result (slots to keep)
//   SIFT       keep those slots (sifter, with Bob's bases on both basis
//              inputs and the match mask as valid), send the first CAL_BITS
//              sifted bits back as the calibration sequence
//   KEY        stream the remaining sifted bits on final_key with ldkey, set
//              key_done (held until the next START), return to GEN
// Because the bases are drawn before START arrives, Bob is armed well before
// Alice's first laser slot. Bob is not told whether Alice abandoned the key;
// his key stream is qualified by Alice's abort. The protocol steps are the
// protocol's; message contents and ordering are this design's choices.
module bob_ctrl
  import bb84_pkg::*;
#(
  parameter int unsigned N_SLOTS       = 15,
  parameter int unsigned CAL_BITS      = 2,
  parameter int unsigned WINDOW_CYCLES = 6,
  parameter int unsigned CLKS_PER_BIT  = 16,
  parameter logic [15:0] SEED          = 16'h5A3C
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         sync,
  input  logic [1:0]                   det,
  output logic                         basis_sel,
  output logic                         txd,
  input  logic                         rxd,
  output logic [2:0]                   state,
  output logic [$clog2(N_SLOTS+1)-1:0] num,
  output logic                         final_key,
  output logic                         ldkey,
  output logic                         key_done
);
  localparam int unsigned IW = $clog2(N_SLOTS);
  localparam int unsigned NW = $clog2(N_SLOTS + 1);

  initial begin
    assert (N_SLOTS <= MSG_DATA_W) else $error("N_SLOTS must fit one message");
  end

  bob_state_e st;
  logic [1:0] ph;
  assign state = st;

  // ---------------- random bases ----------------
  logic               gen, rnd_busy, rnd_ready, rd_key_unused, rd_basis_unused;
  logic [N_SLOTS-1:0] key_unused, bases;
  random_data #(.N_SLOTS(N_SLOTS), .SEED(SEED)) u_rand (
    .clk, .rst_n, .gen, .busy(rnd_busy), .ready(rnd_ready), .rd_addr('0),
    .rd_key(rd_key_unused), .rd_basis(rd_basis_unused), .ini_key(key_unused), .alphabet(bases)
  );

  // ---------------- measurement ----------------
  logic               arm, meas_busy, meas_done;
  logic [N_SLOTS-1:0] raw_key, detected;
  bob_measure #(.N_SLOTS(N_SLOTS), .WINDOW_CYCLES(WINDOW_CYCLES)) u_meas (
    .clk, .rst_n, .arm, .sync, .det, .bases, .basis_sel, .raw_key, .detected,
    .busy(meas_busy), .done(meas_done)
  );

  // ---------------- classical channel ----------------
  logic tx_valid, tx_ready, rx_valid;
  msg_t tx_msg, rx_msg;
  rt_interface #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rt (
    .clk, .rst_n, .tx_valid, .tx_msg, .tx_ready, .rx_valid, .rx_msg, .txd, .rxd
  );

  logic               got_start, got_match, clr_start, clr_match;
  logic [N_SLOTS-1:0] match;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got_start <= 1'b0;
      got_match <= 1'b0;
      match     <= '0;
    end else begin
      if (clr_start) got_start <= 1'b0;
      if (clr_match) got_match <= 1'b0;
      if (rx_valid) begin
        unique case (rx_msg.mtype)
          MSG_START: got_start <= 1'b1;
          MSG_MATCH: begin match <= rx_msg.data[N_SLOTS-1:0]; got_match <= 1'b1; end
          default: ;
        endcase
      end
    end
  end

  // ---------------- sifting ----------------
  logic               sift_start, sift_busy, sift_done;
  logic [N_SLOTS-1:0] sift_key, sift_match;
  logic [IW-1:0]      sift_addr;
  sifter #(.N_SLOTS(N_SLOTS)) u_sift (
    .clk, .rst_n, .start(sift_start), .alice_alphabet(bases), .bob_alphabet(bases), .valid(match),
    .ini_key(raw_key), .orig_key(sift_key), .match(sift_match), .num, .addr(sift_addr),
    .busy(sift_busy), .done(sift_done)
  );

  // ---------------- control ----------------
  logic [NW-1:0] k;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= B_GEN;
      ph         <= '0;
      gen        <= 1'b0;
      arm        <= 1'b0;
      sift_start <= 1'b0;
      clr_start  <= 1'b0;
      clr_match  <= 1'b0;
      tx_valid   <= 1'b0;
      tx_msg     <= '{mtype: MSG_DET, data: '0};
      k          <= '0;
      final_key  <= 1'b0;
      ldkey      <= 1'b0;
      key_done   <= 1'b0;
    end else begin
      gen        <= 1'b0;
      arm        <= 1'b0;
      sift_start <= 1'b0;
      clr_start  <= 1'b0;
      clr_match  <= 1'b0;
      ldkey      <= 1'b0;
      unique case (st)
        B_GEN: unique case (ph)
          2'd0: begin gen <= 1'b1; ph <= 2'd1; end
          2'd1: ph <= 2'd2;                          // gen reaches random_data
          default: if (rnd_ready) begin st <= B_IDLE; ph <= 2'd0; end
        endcase
        B_IDLE: if (got_start) begin
          clr_start <= 1'b1;
          clr_match <= 1'b1;
          key_done  <= 1'b0;
          arm       <= 1'b1;
          st        <= B_MEAS;
        end
        B_MEAS: if (meas_done) begin
          st       <= B_SEND_DET;
          tx_valid <= 1'b1;
          tx_msg   <= '{mtype: MSG_DET, data: MSG_DATA_W'(detected)};
        end
        B_SEND_DET: if (tx_ready) begin
          st       <= B_SEND_BASES;
          tx_valid <= 1'b0;
        end
        B_SEND_BASES: if (!tx_valid) begin
          tx_valid <= 1'b1;
          tx_msg   <= '{mtype: MSG_BASES, data: MSG_DATA_W'(bases)};
        end else if (tx_ready) begin
          tx_valid <= 1'b0;
          st       <= B_WAIT_MATCH;
        end
        B_WAIT_MATCH: if (got_match) begin
          sift_start <= 1'b1;
          st         <= B_SIFT;
          ph         <= 2'd0;
        end
        B_SIFT: unique case (ph)
          2'd0: if (sift_done) begin
            tx_valid <= 1'b1;
            tx_msg   <= '{mtype: MSG_CAL, data: MSG_DATA_W'(sift_key[CAL_BITS-1:0])};
            ph       <= 2'd1;
          end
          default: if (tx_ready) begin
            tx_valid <= 1'b0;
            k        <= NW'(CAL_BITS);
            st       <= B_KEY;
            ph       <= 2'd0;
          end
        endcase
        B_KEY: if (k < num) begin
          final_key <= sift_key[k];
          ldkey     <= 1'b1;
          k         <= k + 1'b1;
        end else begin
          key_done <= 1'b1;
          st       <= B_GEN;
        end
        default: st <= B_GEN;
      endcase
    end
  end
endmodule
