// uart_rx: asynchronous serial byte receiver matching uart_tx (8N1, LSB first,
// CLKS_PER_BIT clocks per bit). rxd passes two synchroniser flip-flops; a
// falling edge starts a byte, the start bit is re-checked at mid-bit and each
// following bit is sampled at its middle. valid pulses for one clock with the
// byte when the stop bit is sampled high; a low stop bit drops the byte and sets
// frame_err for one clock. valid therefore comes about 9.5 bit times after the
// start edge.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;
  rx_state_e     st;
  logic [1:0]    sync_q;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic          rx;

  assign rx = sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= 2'b11;
      st        <= R_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync_q    <= {sync_q[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (st)
        R_IDLE: if (!rx) begin
          st  <= R_START;
          cnt <= '0;
        end
        R_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt  <= '0;
            bitn <= '0;
            st   <= rx ? R_IDLE : R_DATA;   // glitch: back to idle
          end else cnt <= cnt + 1'b1;
        end
        R_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            data <= {rx, data[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) st <= R_STOP;
          end else cnt <= cnt + 1'b1;
        end
        R_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt       <= '0;
            valid     <= rx;
            frame_err <= !rx;
            st        <= R_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
