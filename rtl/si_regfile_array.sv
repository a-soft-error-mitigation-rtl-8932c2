// si_regfile_array - register storage with one self-pi bit per register.
//
// NREGS registers of W bits, one synchronous write port and NREAD
// asynchronous read ports, plus one self-pi flag per register that records
// whether the register holds a value with embedded check bits.  The write
// port stores word and flag together.
//
// Reset (synchronous, active high) clears every self-pi flag, as the design
// requires, and also clears the register words so that every read after
// reset is defined; the latter is this implementation's choice.
//
// The inj_* inputs flip one stored data bit at a clock edge.  They model a
// particle strike for fault-injection tests (one random register, one random
// bit) and are tied low in normal use.  A write to the same register in the
// same cycle wins, since a write overwrites any earlier upset.
//
// Timing: a write is visible on the read ports from the cycle after we is
// sampled; reads are combinational from the read address, with no bypass of
// a write in the same cycle (not described, so not provided).
module si_regfile_array #(
  parameter int unsigned NREGS = si_pkg::NREGS,
  parameter int unsigned W     = si_pkg::REG_W,
  parameter int unsigned NREAD = si_pkg::NREAD,
  localparam int unsigned AW   = $clog2(NREGS),
  localparam int unsigned BW   = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wword,
  input  logic          wpi,
  // read ports
  input  logic [AW-1:0] raddr [NREAD],
  output logic [W-1:0]  rword [NREAD],
  output logic          rpi   [NREAD],
  // single-event-upset injection (test only)
  input  logic          inj_en,
  input  logic [AW-1:0] inj_addr,
  input  logic [BW-1:0] inj_bit
);

  logic [W-1:0] regs     [NREGS];
  logic         self_pi  [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) begin
        regs[i]    <= '0;
        self_pi[i] <= 1'b0;
      end
    end else begin
      if (inj_en)
        regs[inj_addr][inj_bit] <= ~regs[inj_addr][inj_bit];
      if (we) begin
        regs[waddr]    <= wword;
        self_pi[waddr] <= wpi;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < NREAD; r++) begin
      rword[r] = regs[raddr[r]];
      rpi[r]   = self_pi[raddr[r]];
    end
  end

endmodule
