// uart_tx: asynchronous serial byte transmitter (8 data bits, LSB first, one
// stop bit, no parity) at CLKS_PER_BIT clocks per bit. A byte is accepted when
// valid and ready are both high; ready is low until the stop bit has been sent,
// so one byte takes 10*CLKS_PER_BIT clocks. txd idles high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [9:0]    sh;     // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    nbits;  // bits left to send
  logic [CW-1:0] cnt;

  assign ready = (nbits == '0);
  assign txd   = ready ? 1'b1 : sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '1;
      nbits <= '0;
      cnt   <= '0;
    end else if (ready) begin
      if (valid) begin
        sh    <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt   <= '0;
      sh    <= {1'b1, sh[9:1]};
      nbits <= nbits - 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
