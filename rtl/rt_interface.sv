// rt_interface: receiver/transmitter interface to the classical channel.
//
// Carries typed messages (bb84_pkg::msg_t: a type byte and 16 data bits)
// between Alice and Bob over an asynchronous serial line, as three bytes: type,
// data[7:0], data[15:8]. The transmit side accepts a message when tx_valid and
// tx_ready are high and sends it in 30*CLKS_PER_BIT clocks; tx_ready returns
// high once the last stop bit is out. The receive side assembles three bytes
// and pulses rx_valid for one clock with the message; a framing error discards
// the partial message, and a gap of more than 32 bit times between bytes
// restarts the assembly. The serial format and the message framing are this
// design's choices: only the role of the module (communication over the
// classical channel) is given for the protocol.
module rt_interface #(
  parameter int unsigned CLKS_PER_BIT = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tx_valid,
  input  bb84_pkg::msg_t  tx_msg,
  output logic            tx_ready,
  output logic            rx_valid,
  output bb84_pkg::msg_t  rx_msg,
  output logic            txd,
  input  logic            rxd
);
  import bb84_pkg::*;

  // ---------------- transmit ----------------
  logic [23:0] tx_buf;
  logic [1:0]  tx_left;     // bytes still to hand to the UART
  logic        u_tx_ready, u_tx_valid;

  assign u_tx_valid = (tx_left != '0);
  assign tx_ready   = (tx_left == '0) && u_tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_buf  <= '0;
      tx_left <= '0;
    end else if (tx_left == '0) begin
      if (tx_valid && u_tx_ready) begin
        tx_buf  <= {tx_msg.data[15:8], tx_msg.data[7:0], 8'(tx_msg.mtype)};
        tx_left <= 2'd3;
      end
    end else if (u_tx_ready) begin
      tx_buf  <= {8'h00, tx_buf[23:8]};
      tx_left <= tx_left - 1'b1;
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .valid(u_tx_valid), .data(tx_buf[7:0]), .ready(u_tx_ready), .txd
  );

  // ---------------- receive ----------------
  logic [7:0]  rb;
  logic        rb_valid, rb_err;
  logic [1:0]  rx_cnt;
  logic [7:0]  rx_lo;
  logic [7:0]  rx_type;
  localparam int unsigned GAP = 32 * CLKS_PER_BIT;
  logic [$clog2(GAP+1)-1:0] gap;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .valid(rb_valid), .data(rb), .frame_err(rb_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt   <= '0;
      rx_lo    <= '0;
      rx_type  <= '0;
      rx_valid <= 1'b0;
      rx_msg   <= '{mtype: MSG_START, data: '0};
      gap      <= '0;
    end else begin
      rx_valid <= 1'b0;
      if (rb_err) begin
        rx_cnt <= '0;
      end else if (rb_valid) begin
        gap <= '0;
        unique case (rx_cnt)
          2'd0: begin rx_type <= rb; rx_cnt <= 2'd1; end
          2'd1: begin rx_lo <= rb; rx_cnt <= 2'd2; end
          default: begin
            rx_msg   <= '{mtype: msg_type_e'(rx_type), data: {rb, rx_lo}};
            rx_valid <= 1'b1;
            rx_cnt   <= 2'd0;
          end
        endcase
      end else if (rx_cnt != '0) begin
        if (gap == $clog2(GAP+1)'(GAP)) rx_cnt <= '0;
        else                            gap    <= gap + 1'b1;
      end
    end
  end

  // a message offered must stay stable until it is taken
  property p_tx_hold;
    @(posedge clk) disable iff (!rst_n) (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_msg));
  endproperty
  a_tx_hold: assert property (p_tx_hold) else $error("tx message dropped before accepted");
endmodule
