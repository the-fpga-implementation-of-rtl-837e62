// alice_top: Alice's side of the BB84 key distribution, sequenced by an
// eight-state Moore machine.
//
//   Idle        wait for a rising edge on start (two-flop synchronised)
//   Encode      send START to Bob over the classical channel, then let
//               random_data draw N_SLOTS random (key bit, basis) pairs
//   Q_trans     for each slot: read the pair, map it to a laser through the
//               RAM0/RAM1 polarisation encoder, fire one laser slot
//   P_rec1      wait for Bob's detected-slot mask and his bases
//   Compare     sift: keep detected slots whose bases agree (sifter)
//   P_trans     send the comparison result (match mask) to Bob
//   P_rec2      wait for Bob's calibration bits
//   Misestimate compare them with the start of the sifted key, abandon the key
//               above ERR_THRESH_PCT errors, else stream out the rest
//
// Messages from Bob are latched per type in any state, so their arrival order
// against the state machine does not matter. One slot in Q_trans takes
// SLOT_CYCLES+2 clocks (encoder read, fire, slot). Outputs: ld/ld_sync to the
// lasers, txd/rxd to the classical channel, final_key with ldkey, key_done and
// key_abort (levels until the next round), state for monitoring. The state
// list and the module split follow the protocol's top-level design; the
// message set, the start-message timing and the latching are this design's.
module alice_top
  import bb84_pkg::*;
#(
  parameter int unsigned N_SLOTS        = 15,
  parameter int unsigned CAL_BITS       = 2,
  parameter int unsigned ERR_THRESH_PCT = 11,
  parameter int unsigned SLOT_CYCLES    = 8,
  parameter int unsigned PULSE_CYCLES   = 1,
  parameter int unsigned PULSE_OFFSET   = 2,
  parameter int unsigned CLKS_PER_BIT   = 16,
  parameter logic [15:0] SEED           = 16'hACE1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  // laser diodes
  output logic [3:0]                   ld,
  output logic                         ld_sync,
  // classical channel
  output logic                         txd,
  input  logic                         rxd,
  // polarisation RAM configuration
  input  logic                         cfg_we,
  input  logic                         cfg_ram,
  input  logic                         cfg_addr,
  input  logic [3:0]                   cfg_data,
  // results
  output logic [2:0]                   state,
  output logic [$clog2(N_SLOTS+1)-1:0] num,
  output logic [$clog2(CAL_BITS+1)-1:0] err_cnt,
  output logic                         final_key,
  output logic                         ldkey,
  output logic                         key_done,
  output logic                         key_abort
);
  localparam int unsigned IW = $clog2(N_SLOTS);

  initial begin
    assert (N_SLOTS <= MSG_DATA_W) else $error("N_SLOTS must fit one message");
    assert (CAL_BITS <= N_SLOTS) else $error("CAL_BITS above N_SLOTS");
  end

  alice_state_e st;
  logic [1:0]   ph;
  logic [IW-1:0] qi;
  assign state = st;

  // ---------------- start edge ----------------
  logic [2:0] start_q;
  logic       start_rise;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_q <= '0;
    else        start_q <= {start_q[1:0], start};
  end
  assign start_rise = start_q[1] && !start_q[2];

  // ---------------- random data ----------------
  logic gen, rnd_busy, rnd_ready, rd_key, rd_basis;
  logic [N_SLOTS-1:0] ini_key, alice_alphabet;
  random_data #(.N_SLOTS(N_SLOTS), .SEED(SEED)) u_rand (
    .clk, .rst_n, .gen, .busy(rnd_busy), .ready(rnd_ready), .rd_addr(qi),
    .rd_key, .rd_basis, .ini_key, .alphabet(alice_alphabet)
  );

  // ---------------- encoder and laser drive ----------------
  logic       enc_in_valid, enc_out_valid;
  logic [3:0] ld_code;
  logic       slot_done, laser_busy;
  assign enc_in_valid = (st == A_QTRANS) && (ph == 2'd0);

  pol_encoder u_enc (
    .clk, .rst_n, .in_valid(enc_in_valid), .in_bit(rd_key), .in_basis(rd_basis),
    .out_valid(enc_out_valid), .ld_code, .cfg_we, .cfg_ram, .cfg_addr, .cfg_data
  );

  laser_driver #(.SLOT_CYCLES(SLOT_CYCLES), .PULSE_CYCLES(PULSE_CYCLES), .PULSE_OFFSET(PULSE_OFFSET)) u_laser (
    .clk, .rst_n, .fire(enc_out_valid), .ld_code, .ld, .sync(ld_sync), .busy(laser_busy), .slot_done
  );

  // ---------------- classical channel ----------------
  logic tx_valid, tx_ready, rx_valid;
  msg_t tx_msg, rx_msg;
  rt_interface #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rt (
    .clk, .rst_n, .tx_valid, .tx_msg, .tx_ready, .rx_valid, .rx_msg, .txd, .rxd
  );

  logic [N_SLOTS-1:0]  bob_det, bob_bases;
  logic [CAL_BITS-1:0] bob_cal;
  logic                got_det, got_bases, got_cal, clr_got;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bob_det   <= '0;
      bob_bases <= '0;
      bob_cal   <= '0;
      got_det   <= 1'b0;
      got_bases <= 1'b0;
      got_cal   <= 1'b0;
    end else if (clr_got) begin
      got_det   <= 1'b0;
      got_bases <= 1'b0;
      got_cal   <= 1'b0;
    end else if (rx_valid) begin
      unique case (rx_msg.mtype)
        MSG_DET:   begin bob_det   <= rx_msg.data[N_SLOTS-1:0];  got_det   <= 1'b1; end
        MSG_BASES: begin bob_bases <= rx_msg.data[N_SLOTS-1:0];  got_bases <= 1'b1; end
        MSG_CAL:   begin bob_cal   <= rx_msg.data[CAL_BITS-1:0]; got_cal   <= 1'b1; end
        default: ;
      endcase
    end
  end

  // ---------------- key extraction and error estimation ----------------
  logic               sift_start, sift_busy, sift_done;
  logic [N_SLOTS-1:0] orig_key, match;
  logic [IW-1:0]      sift_addr;
  sifter #(.N_SLOTS(N_SLOTS)) u_sift (
    .clk, .rst_n, .start(sift_start), .alice_alphabet, .bob_alphabet(bob_bases), .valid(bob_det),
    .ini_key, .orig_key, .match, .num, .addr(sift_addr), .busy(sift_busy), .done(sift_done)
  );

  logic est_start, est_busy;
  logic [$clog2(N_SLOTS+1)-1:0] key_len;
  err_est #(.N_SLOTS(N_SLOTS), .CAL_BITS(CAL_BITS), .ERR_THRESH_PCT(ERR_THRESH_PCT)) u_est (
    .clk, .rst_n, .start(est_start), .orig_key, .num, .bob_key(bob_cal), .err_cnt, .key_len,
    .final_key, .ldkey, .busy(est_busy), .done(key_done), .abandon(key_abort)
  );

  // ---------------- top-level Moore machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= A_IDLE;
      ph         <= '0;
      qi         <= '0;
      gen        <= 1'b0;
      tx_valid   <= 1'b0;
      tx_msg     <= '{mtype: MSG_START, data: '0};
      sift_start <= 1'b0;
      est_start  <= 1'b0;
      clr_got    <= 1'b0;
    end else begin
      gen        <= 1'b0;
      sift_start <= 1'b0;
      est_start  <= 1'b0;
      clr_got    <= 1'b0;
      unique case (st)
        A_IDLE: if (start_rise) begin
          st       <= A_ENCODE;
          ph       <= 2'd0;
          clr_got  <= 1'b1;
          tx_valid <= 1'b1;
          tx_msg   <= '{mtype: MSG_START, data: '0};
        end
        A_ENCODE: unique case (ph)
          2'd0: if (tx_valid && tx_ready) begin   // START taken
            tx_valid <= 1'b0;
            ph       <= 2'd1;
          end
          2'd1: if (tx_ready) begin               // START fully sent
            gen <= 1'b1;
            ph  <= 2'd2;
          end
          2'd2: ph <= 2'd3;                       // gen reaches random_data
          default: if (rnd_ready) begin
            st <= A_QTRANS;
            ph <= 2'd0;
            qi <= '0;
          end
        endcase
        A_QTRANS: unique case (ph)
          2'd0: ph <= 2'd1;                       // encoder reads RAM0/RAM1
          2'd1: ph <= 2'd2;                       // laser fires
          default: if (slot_done) begin
            ph <= 2'd0;
            if (qi == IW'(N_SLOTS - 1)) st <= A_PREC1;
            else                        qi <= qi + 1'b1;
          end
        endcase
        A_PREC1: if (got_det && got_bases) begin
          st         <= A_COMPARE;
          sift_start <= 1'b1;
        end
        A_COMPARE: if (sift_done) begin
          st       <= A_PTRANS;
          tx_valid <= 1'b1;
          tx_msg   <= '{mtype: MSG_MATCH, data: MSG_DATA_W'(match)};
        end
        A_PTRANS: if (tx_ready) begin
          tx_valid <= 1'b0;
          st       <= A_PREC2;
        end
        A_PREC2: if (got_cal) begin
          st        <= A_MISEST;
          ph        <= 2'd0;
          est_start <= 1'b1;
        end
        A_MISEST: unique case (ph)
          2'd0: ph <= 2'd1;                       // start reaches err_est
          default: if (key_done) begin
            st <= A_IDLE;
            ph <= 2'd0;
          end
        endcase
        default: st <= A_IDLE;
      endcase
    end
  end

  // the laser is only ever fired when idle
  a_fire_idle: assert property (@(posedge clk) disable iff (!rst_n) enc_out_valid |-> !laser_busy)
    else $error("laser fired during a slot");
endmodule
