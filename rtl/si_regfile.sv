// si_regfile - Self-Immunity protected register file.
//
// A W-bit, NREGS-entry register file with NREAD read ports and one write
// port (32 bits, 32 entries, 2 read ports by default) that protects every
// value narrow enough to leave the upper register bits unused.  On a write,
// si_write_path tests the upper six bits: if they are zero the 26-bit value
// is stored with its 5 Hamming check bits in bits 30:26 and the register's
// self-pi flag is set; otherwise the value is stored plainly and self-pi is
// cleared.  On a read, each port's si_read_path corrects a single upset bit
// of a protected word and returns the 26-bit value zero-extended, or returns
// an unprotected word unchanged.  No extra storage is used besides the one
// self-pi bit per register.
//
// Interface: write port (we, waddr, wdata), read ports raddr[i] -> rdata[i]
// with rcorr[i] set when a bit was repaired on that read, and the inj_*
// upset-injection inputs of si_regfile_array (tie low in normal use).
// Timing: writes take effect at the clock edge; reads are combinational.
// Reset is synchronous and active high.  An assertion checks that every
// word written as protected has its spare top bit(s) at zero.
module si_regfile #(
  parameter int unsigned NREGS = si_pkg::NREGS,
  parameter int unsigned W     = si_pkg::REG_W,
  parameter int unsigned NREAD = si_pkg::NREAD,
  localparam int unsigned AW   = $clog2(NREGS),
  localparam int unsigned BW   = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr [NREAD],
  output logic [W-1:0]  rdata [NREAD],
  output logic          rcorr [NREAD],
  output logic          rpi   [NREAD],   // self-pi of the register read
  input  logic          inj_en,
  input  logic [AW-1:0] inj_addr,
  input  logic [BW-1:0] inj_bit
);

  logic [W-1:0] wword;
  logic         wpi;
  logic [W-1:0] rword [NREAD];

  si_write_path #(.W(W)) u_wpath (
    .wdata   (wdata),
    .word    (wword),
    .self_pi (wpi)
  );

  si_regfile_array #(.NREGS(NREGS), .W(W), .NREAD(NREAD)) u_array (
    .clk      (clk),
    .rst      (rst),
    .we       (we),
    .waddr    (waddr),
    .wword    (wword),
    .wpi      (wpi),
    .raddr    (raddr),
    .rword    (rword),
    .rpi      (rpi),
    .inj_en   (inj_en),
    .inj_addr (inj_addr),
    .inj_bit  (inj_bit)
  );

  // A word stored as protected never has bits above the code word set.
  localparam int unsigned K = si_pkg::value_bits(W);
  localparam int unsigned P = si_pkg::check_bits(K);
  a_spare_zero : assert property (@(posedge clk) disable iff (rst)
                                  (we && wpi) |-> (wword[W-1:K+P] == '0));

  for (genvar r = 0; r < NREAD; r++) begin : g_rd
    si_read_path #(.W(W)) u_rpath (
      .word      (rword[r]),
      .self_pi   (rpi[r]),
      .rdata     (rdata[r]),
      .corrected (rcorr[r])
    );
  end

endmodule
