// Hard decision memory block HDMB(j): p hard-decision bits of block column j.
// Written one bit per cycle during variable node processing at the address of its own
// binary counter (ld resets it to 0); read from outside through a separate address.
module bldpc_hdmb #(
  parameter int unsigned P = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld,
  input  logic                  we,
  input  logic                  wbit,
  input  logic [$clog2(P)-1:0]  raddr,
  output logic                  rbit
);
  logic [P-1:0]         mem;
  logic [$clog2(P)-1:0] addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      mem  <= '0;
    end else begin
      addr <= ld ? '0 : addr + 1'b1;
      if (we) mem[addr] <= wbit;
    end
  end

  assign rbit = mem[raddr];
endmodule
