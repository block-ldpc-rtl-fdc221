// Channel message memory block pair CMMB(j) for block column j.
// Two banks of p Q-bit channel messages: the receiving bank is written from the input port
// (we/waddr/wdata) while the working bank is read by the decoder; swap exchanges them when a
// new frame starts decoding. The working bank is read at the address of this block's own
// binary counter (ld resets it to 0, otherwise it counts up).
// The two-set arrangement follows the Block-LDPC architecture; the write port is this design's choice.
module bldpc_cmmb #(
  parameter int unsigned P = 32,
  parameter int unsigned Q = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        swap,
  input  logic                        we,
  input  logic [$clog2(P)-1:0]        waddr,
  input  logic signed [Q-1:0]         wdata,
  input  logic                        ld,
  output logic signed [Q-1:0]         rdata
);
  logic signed [Q-1:0]  mem [2][P];
  logic                 rsel;
  logic [$clog2(P)-1:0] addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsel <= 1'b0;
      addr <= '0;
    end else begin
      if (swap) rsel <= ~rsel;
      addr <= ld ? '0 : addr + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (we) mem[~rsel][waddr] <= wdata;

  assign rdata = mem[rsel][addr];
endmodule
