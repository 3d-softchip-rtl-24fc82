// prog_mem: banked program memory of a unit chip.  Several program sets are
// held at once so the control processor can switch to another program at
// run time by changing the bank it fetches from.
// Write port (host loading): one 32-bit word per clock into bank wbank,
// word address waddr.  Read port (instruction fetch): combinational read of
// bank rbank, word address raddr.  The number of banks and their depth are
// choices of this design.  The array is not reset.
module prog_mem #(
  parameter int NBANK = 2,
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(NBANK)-1:0] wbank,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [31:0]              wdata,
  input  logic [$clog2(NBANK)-1:0] rbank,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [31:0]              rdata
);

  logic [31:0] mem [NBANK * DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[{wbank, waddr}] <= wdata;
  end

  assign rdata = mem[{rbank, raddr}];

endmodule
