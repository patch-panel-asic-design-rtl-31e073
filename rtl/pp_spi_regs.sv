// pp_spi_regs: SPI slave and radiation-tolerant configuration registers.
//
// A frame is 224 bits, shifted MSB first in the order Channel B, Channel A,
// PLL, Common (see pp_pkg). While SS_N is high the shift register is kept
// loaded with the current configuration, so that during a frame MISO returns
// the old contents in the same order as MOSI brings in the new ones. When SS_N
// rises after exactly 224 bits the frame is written; a frame of any other
// length is dropped.
//
// The configuration is held in three copies. Every clock each copy is
// rewritten with the bitwise majority of the three, so a single upset is
// outvoted at once and repaired on the next clock. SEU goes high when the
// copies disagree and stays high until a reset or the next written frame.
// The copies carry a keep attribute: they are logically identical, and
// synthesis would otherwise merge them into one.
//
// The SPI pins are oversampled by the 40 MHz CLK through two-flop
// synchronisers; SCK must therefore stay high and low for at least 3 CLK
// periods each (SCK up to about 5 MHz). CPOL and CPHA select the SPI mode:
// data are sampled on the rising SCK edge when CPOL equals CPHA, on the
// falling edge otherwise. MISO changes three CLK periods after the sampling
// edge, well before the master samples the next bit in any mode.
// RESET_N and RSPI_N both return all registers to their initial values.
//
// Following the published design: frame layout, bit order, register
// initial values, voting registers, SEU output, separate SPI reset.
// Own choices: CLK-domain oversampling, load on SS_N rising, the 224-bit length
// check, sticky SEU, and the MISO enable (MISO is driven only while selected).
`timescale 1ns / 1ps
module pp_spi_regs
  import pp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,     // RESET_ pin, active low
  input  logic rspi_n,    // RSPI_ pin, active low
  input  logic sck,
  input  logic mosi,
  input  logic ss_n,
  input  logic cpol,
  input  logic cpha,
  output logic miso,
  output logic miso_oe,
  output cfg_t cfg,       // voted configuration
  output logic seu
);

  logic arst_n;
  assign arst_n = rst_n & rspi_n;

  // Two-flop synchronisers plus one history stage for SCK and SS_N.
  logic [2:0] sck_q, ss_q;
  logic [1:0] mosi_q;
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      sck_q  <= '0;
      ss_q   <= '1;
      mosi_q <= '0;
    end else begin
      sck_q  <= {sck_q[1:0], sck};
      ss_q   <= {ss_q[1:0], ss_n};
      mosi_q <= {mosi_q[0], mosi};
    end
  end

  logic sck_rise, sck_fall, sample, selected, ss_rise;
  assign sck_rise = sck_q[1] & ~sck_q[2];
  assign sck_fall = ~sck_q[1] & sck_q[2];
  assign sample   = (cpol == cpha) ? sck_rise : sck_fall;
  assign selected = ~ss_q[1];
  assign ss_rise  = ss_q[1] & ~ss_q[2];

  logic [CFG_BITS-1:0] sr;
  logic [8:0]          nbits;
  logic                write;
  assign write = ss_rise && (nbits == 9'(CFG_BITS));

  // Triplicated configuration with majority vote.
  (* keep *) cfg_t r0, r1, r2;
  cfg_t voted;
  assign voted = (r0 & r1) | (r1 & r2) | (r0 & r2);
  assign cfg   = voted;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      sr    <= CFG_INIT;
      nbits <= '0;
    end else if (!selected) begin
      sr    <= voted;
      nbits <= '0;
    end else if (sample) begin
      sr    <= {sr[CFG_BITS-2:0], mosi_q[1]};
      if (nbits != '1) nbits <= nbits + 9'd1;
    end
  end

  (* keep *)
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n)    r0 <= CFG_INIT;
    else if (write) r0 <= cfg_t'(sr);
    else            r0 <= voted;
  end

  (* keep *)
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n)    r1 <= CFG_INIT;
    else if (write) r1 <= cfg_t'(sr);
    else            r1 <= voted;
  end

  (* keep *)
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n)    r2 <= CFG_INIT;
    else if (write) r2 <= cfg_t'(sr);
    else            r2 <= voted;
  end

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n)     seu <= 1'b0;
    else if (write)  seu <= 1'b0;
    else if ((r0 != r1) || (r1 != r2)) seu <= 1'b1;
  end

  assign miso    = sr[CFG_BITS-1];
  assign miso_oe = selected;

  // A frame is written only on the rising edge of SS_N.
  a_write_on_deselect: assert property (@(posedge clk) disable iff (!arst_n)
    write |-> (ss_q[1] && !ss_q[2]));

endmodule
