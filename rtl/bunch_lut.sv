// bunch_lut: the bunch table, a true dual-port block RAM with one 16-bit entry
// per bunch of a train (2700 entries by default, as in the AGIPD system).
//
// Entry format (see agipd_pkg): bit 15 = veto flag, bits 14:0 = ASIC cell ID.
// Both ports can read or write; a read returns the entry one clock later
// (registered output, read-first when the same port writes). Port A is used
// by the acquisition state machine and later by the train builder, port B by
// the read-modify-write of a VETO. Writing the same address from both ports
// in one cycle is not allowed. The table is not cleared by reset: every
// entry of a train is written before it is read.
module bunch_lut #(
  parameter int unsigned DEPTH  = 2700,
  parameter int unsigned WIDTH  = 16,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

  // synthesis-neutral check of the port usage rule
  always_ff @(posedge clk) begin
    assert (!(a_en && a_we && b_en && b_we && a_addr == b_addr))
      else $error("bunch_lut: both ports write address %0d", a_addr);
  end

endmodule
