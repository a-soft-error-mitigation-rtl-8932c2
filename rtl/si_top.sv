// si_top - Self-Immunity register file with its encode/decode demonstrator.
//
// Two parts stand side by side, each with its own ports:
//  * si_regfile: the protected register file (32 x 32 bits, two read ports,
//    one write port by default) that a processor pipeline would use.  The
//    processor itself is not part of this design, so the register file's
//    ports are the top's ports.  The inj_* inputs flip one stored bit for
//    fault-injection tests and are tied low in normal use.
//  * si_codec_chain: the clocked "encoder block then decoder block" pipeline
//    with ports clock, reset, input_data, output_data, as the design was
//    demonstrated on an FPGA.
// Both reset synchronously on an active-high reset.  Register-file writes
// take effect at the clock edge and reads are combinational; the codec chain
// has a latency of two clock edges.
module si_top #(
  parameter int unsigned NREGS = si_pkg::NREGS,
  parameter int unsigned W     = si_pkg::REG_W,
  parameter int unsigned NREAD = si_pkg::NREAD,
  localparam int unsigned AW   = $clog2(NREGS),
  localparam int unsigned BW   = $clog2(W)
) (
  // protected register file
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr [NREAD],
  output logic [W-1:0]  rdata [NREAD],
  output logic          rcorr [NREAD],
  output logic          rpi   [NREAD],
  input  logic          inj_en,
  input  logic [AW-1:0] inj_addr,
  input  logic [BW-1:0] inj_bit,
  // encode/decode demonstrator
  input  logic          clock,
  input  logic          reset,
  input  logic [W-1:0]  input_data,
  output logic [W-1:0]  output_data
);

  si_regfile #(.NREGS(NREGS), .W(W), .NREAD(NREAD)) u_regfile (
    .clk      (clk),
    .rst      (rst),
    .we       (we),
    .waddr    (waddr),
    .wdata    (wdata),
    .raddr    (raddr),
    .rdata    (rdata),
    .rcorr    (rcorr),
    .rpi      (rpi),
    .inj_en   (inj_en),
    .inj_addr (inj_addr),
    .inj_bit  (inj_bit)
  );

  si_codec_chain #(.W(W)) u_codec (
    .clock       (clock),
    .reset       (reset),
    .input_data  (input_data),
    .output_data (output_data)
  );

endmodule
