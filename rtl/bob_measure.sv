// bob_measure: Bob's measure module.
//
// After a pulse on arm the module measures N_SLOTS time slots. For slot i it
// drives the analyser basis basis_sel = bases[i]; each sync pulse from Alice
// opens a detection window of WINDOW_CYCLES+1 clocks (the sync clock and WINDOW_CYCLES after it) during which clicks of the
// two detectors (det[0]: bit 0, det[1]: bit 1) are collected. At the end of the
// window the slot is recorded: detected[i] is set if exactly one detector
// clicked, raw_key[i] takes the bit of that detector, and the slot index
// advances. done pulses in the clock after the last window closes. The
// window must close before the next sync (WINDOW_CYCLES < slot period).
// Discarding double clicks and the two-detector arrangement are this design's
// choices; recording result and basis per slot follows the protocol.
module bob_measure #(
  parameter int unsigned N_SLOTS       = 15,
  parameter int unsigned WINDOW_CYCLES = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     arm,
  input  logic                     sync,
  input  logic [1:0]               det,
  input  logic [N_SLOTS-1:0]       bases,
  output logic                     basis_sel,
  output logic [N_SLOTS-1:0]       raw_key,
  output logic [N_SLOTS-1:0]       detected,
  output logic                     busy,
  output logic                     done
);
  localparam int unsigned IW = $clog2(N_SLOTS);
  localparam int unsigned WW = $clog2(WINDOW_CYCLES + 1);

  logic [IW-1:0] slot;
  logic [WW-1:0] wcnt;
  logic          win;
  logic [1:0]    clicks;
  logic [1:0]    cur;     // clicks including this clock

  assign basis_sel = bases[slot];
  assign cur       = clicks | det;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot     <= '0;
      wcnt     <= '0;
      win      <= 1'b0;
      clicks   <= '0;
      raw_key  <= '0;
      detected <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (arm) begin
          busy     <= 1'b1;
          slot     <= '0;
          win      <= 1'b0;
          raw_key  <= '0;
          detected <= '0;
        end
      end else if (!win) begin
        if (sync) begin
          win    <= 1'b1;
          wcnt   <= '0;
          clicks <= det;
        end
      end else begin
        clicks <= clicks | det;
        if (wcnt == WW'(WINDOW_CYCLES - 1)) begin
          win            <= 1'b0;
          detected[slot] <= (cur[0] ^ cur[1]);
          raw_key[slot]  <= cur[1];
          if (slot == IW'(N_SLOTS - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
            slot <= '0;
          end else begin
            slot <= slot + 1'b1;
          end
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
    end
  end
endmodule
