// laser_driver: laser source drive module.
//
// A pulse on fire (accepted while busy is low) starts one time slot of
// SLOT_CYCLES clocks and latches ld_code, a one-hot select of the four laser
// diodes. sync is high in the first clock of the slot and marks it for the
// receiver; the selected diode is driven high for PULSE_CYCLES clocks starting
// PULSE_OFFSET clocks into the slot; slot_done pulses in the last clock. busy is
// high from the clock after fire until the slot ends, so back-to-back slots
// come every SLOT_CYCLES+1 clocks when the controller refires on slot_done.
// Slot length, pulse position and width, and the sync output are this design's
// choices; the protocol only asks that the chosen diode fires once per slot.
module laser_driver #(
  parameter int unsigned SLOT_CYCLES  = 8,
  parameter int unsigned PULSE_CYCLES = 1,
  parameter int unsigned PULSE_OFFSET = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fire,
  input  logic [3:0] ld_code,
  output logic [3:0] ld,
  output logic       sync,
  output logic       busy,
  output logic       slot_done
);
  localparam int unsigned CW = $clog2(SLOT_CYCLES + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    code_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      code_q <= '0;
    end else if (busy) begin
      if (cnt == CW'(SLOT_CYCLES - 1)) busy <= 1'b0;
      cnt <= cnt + 1'b1;
    end else if (fire) begin
      busy   <= 1'b1;
      cnt    <= '0;
      code_q <= ld_code;
    end
  end

  always_comb begin
    sync      = busy && (cnt == '0);
    slot_done = busy && (cnt == CW'(SLOT_CYCLES - 1));
    ld        = (busy && cnt >= CW'(PULSE_OFFSET) && cnt < CW'(PULSE_OFFSET + PULSE_CYCLES)) ? code_q : 4'b0000;
  end

  initial begin
    assert (PULSE_OFFSET + PULSE_CYCLES <= SLOT_CYCLES)
      else $error("laser pulse does not fit in the slot");
  end
endmodule
