// Decoding message memory block DMMB(i,j).
// Holds the p decoding messages on the p ones of one non-zero block H(i,j), entry c
// belonging to column c of the block. One read and one write per cycle at the same address,
// which comes from the block's own binary counter: loaded with the block's cyclic shift SH
// before check node processing (so in cycle r it addresses the message of check row r) and
// with 0 before variable node processing and initialization. Reads are combinational; the
// write of the same cycle lands at the clock edge (read-modify-write in one cycle).
// Interface: ld/ld_chk load the counter (it counts up otherwise), we/wdata write.
module bldpc_dmmb #(
  parameter int unsigned P  = 32,
  parameter int unsigned Q  = 6,
  parameter int unsigned SH = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ld,
  input  logic                 ld_chk,
  input  logic                 we,
  input  logic signed [Q-1:0]  wdata,
  output logic signed [Q-1:0]  rdata
);
  logic signed [Q-1:0]   mem [P];
  logic [$clog2(P)-1:0]  addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   addr <= '0;
    else if (ld)  addr <= ld_chk ? $clog2(P)'(SH) : '0;
    else          addr <= addr + 1'b1;
  end

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
