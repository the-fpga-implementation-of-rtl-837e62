// pol_encoder: polarisation encoding through two small RAMs.
//
// RAM0 holds the laser code used to send a 0, RAM1 the code used to send a 1;
// each is addressed by the basis (0 rectilinear, 1 diagonal), and each entry is
// a one-hot select of the four laser diodes (H, V, +45, -45). The read is
// registered like a block RAM: ld_code and out_valid appear one clock after
// in_valid. After reset RAM0 = {H, +45} and RAM1 = {V, -45}, the standard BB84
// assignment; the cfg_* write port lets the mapping be changed at run time
// (for example to follow a re-aligned optical bench). The two-RAM split follows
// the protocol description; the reset contents and write port are this
// design's choices.
module pol_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  input  logic       in_basis,
  output logic       out_valid,
  output logic [3:0] ld_code,
  input  logic       cfg_we,
  input  logic       cfg_ram,   // 0: RAM0 (bit 0 codes), 1: RAM1 (bit 1 codes)
  input  logic       cfg_addr,  // basis
  input  logic [3:0] cfg_data
);
  import bb84_pkg::*;

  logic [3:0] ram0 [2];
  logic [3:0] ram1 [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ram0[0] <= POL_H;
      ram0[1] <= POL_P45;
      ram1[0] <= POL_V;
      ram1[1] <= POL_M45;
    end else if (cfg_we) begin
      if (cfg_ram) ram1[cfg_addr] <= cfg_data;
      else         ram0[cfg_addr] <= cfg_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ld_code   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) ld_code <= in_bit ? ram1[in_basis] : ram0[in_basis];
    end
  end
endmodule
