// Partially parallel Block-LDPC decoder.
// One check node unit per block row (m CNUs), one variable node unit per block column
// (n VNUs), one decoding message memory DMMB per non-zero block, a ping-pong channel
// message memory CMMB and a hard decision memory HDMB per block column; all wiring is
// hard-wired from the code in bldpc_code_pkg (CNU i to the DMMBs of row i, VNU j to the
// DMMBs, CMMB and HDMB of column j).
// Decoding a frame: initialization (p cycles) copies each CMMB(j) into every DMMB(i,j) as
// the first variable-to-check messages; then ITER iterations of 2p cycles each: p cycles of
// check node processing (each DMMB counter starts at its block shift, every CNU reads one
// message from each of its DMMBs, writes the result back) and p cycles of variable node
// processing (all counters start at 0, every VNU reads its DMMBs and CMMB, writes back and
// stores the hard decision). Latency: p*(1 + 2*ITER) cycles plus one start cycle.
// Interface: channel messages (Q-bit, positive = bit 0) are written into the receiving
// CMMB bank with llr_we, llr_addr (bit position in the block) and llr_in[j] for all n
// block columns at once. start (taken when busy is low) swaps the banks and decodes; the
// next frame may be written meanwhile. done pulses for one cycle at the end; hd_out[j] is
// then hard-decision bit hd_addr of block column j until the next start.
// Structure, schedule and memory organisation follow the Block-LDPC architecture; the min-sum CNU, the
// message width Q and the iteration count ITER are this design's choices.
module bldpc_decoder
  import bldpc_code_pkg::*;
#(
  parameter int unsigned Q    = 6,
  parameter int unsigned ITER = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                llr_we,
  input  logic [PW-1:0]       llr_addr,
  input  logic signed [Q-1:0] llr_in [N],
  input  logic                start,
  output logic                busy,
  output logic                done,
  input  logic [PW-1:0]       hd_addr,
  output logic [N-1:0]        hd_out
);
  typedef enum logic [1:0] {IDLE, INIT, CHK, VAR} phase_t;
  phase_t       phase;
  logic [PW-1:0] cyc;
  logic [7:0]    it;
  logic          last_cyc;
  logic          ld, ld_chk;        // counter load at the end of a phase, for the next one
  logic          go;

  assign go       = start && phase == IDLE;
  assign last_cyc = (cyc == PW'(P - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= IDLE;
      cyc   <= '0;
      it    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (go) begin
        phase <= INIT;
        cyc   <= '0;
        it    <= '0;
      end else if (phase != IDLE) begin
        cyc <= cyc + 1'b1;
        if (last_cyc) begin
          unique case (phase)
            INIT: phase <= CHK;
            CHK:  phase <= VAR;
            VAR: begin
              if (it == 8'(ITER - 1)) begin
                phase <= IDLE;
                done  <= 1'b1;
              end else begin
                phase <= CHK;
                it    <= it + 1'b1;
              end
            end
            default: phase <= IDLE;
          endcase
        end
      end
    end
  end

  assign busy   = phase != IDLE;
  // counters are loaded in the cycle before each phase starts
  assign ld     = go || phase == IDLE || last_cyc;
  assign ld_chk = (phase == INIT || phase == VAR) && last_cyc && !(phase == VAR && it == 8'(ITER - 1));

  // ---- memories ----
  logic signed [Q-1:0] ch   [N];
  logic signed [Q-1:0] dm_r [NNZ];
  logic signed [Q-1:0] c2v_w[NNZ];
  logic signed [Q-1:0] v2c_w[NNZ];
  logic [N-1:0]        hd_w;

  for (genvar j = 0; j < N; j++) begin : g_cm
    bldpc_cmmb #(.P(P), .Q(Q)) u_cmmb (
      .clk, .rst_n, .swap(go), .we(llr_we), .waddr(llr_addr), .wdata(llr_in[j]),
      .ld, .rdata(ch[j]));
    bldpc_hdmb #(.P(P)) u_hdmb (
      .clk, .rst_n, .ld, .we(phase == VAR), .wbit(hd_w[j]), .raddr(hd_addr), .rbit(hd_out[j]));
  end

  for (genvar b = 0; b < NNZ; b++) begin : g_dm
    logic signed [Q-1:0] wd;
    always_comb
      unique case (phase)
        INIT:    wd = ch[H_COL[b]];
        CHK:     wd = c2v_w[b];
        default: wd = v2c_w[b];
      endcase
    bldpc_dmmb #(.P(P), .Q(Q), .SH(H_SH[b])) u_dmmb (
      .clk, .rst_n, .ld, .ld_chk, .we(phase != IDLE), .wdata(wd), .rdata(dm_r[b]));
  end

  // ---- node units ----
  for (genvar i = 0; i < M; i++) begin : g_cnu
    localparam int unsigned B0 = ROW_START[i];
    localparam int unsigned DC = ROW_START[i+1] - ROW_START[i];
    logic signed [Q-1:0] vin [DC];
    logic signed [Q-1:0] cout [DC];
    for (genvar k = 0; k < DC; k++) begin : g_k
      assign vin[k]          = dm_r[B0 + k];
      assign c2v_w[B0 + k]   = cout[k];
    end
    bldpc_cnu #(.DC(DC), .Q(Q)) u_cnu (.v2c(vin), .c2v(cout));
  end

  for (genvar j = 0; j < N; j++) begin : g_vnu
    localparam int unsigned S0 = COL_START[j];
    localparam int unsigned DV = COL_START[j+1] - COL_START[j];
    logic signed [Q-1:0] cin [DV];
    logic signed [Q-1:0] vout [DV];
    for (genvar k = 0; k < DV; k++) begin : g_k
      assign cin[k]                      = dm_r[COL_PERM[S0 + k]];
      assign v2c_w[COL_PERM[S0 + k]]     = vout[k];
    end
    bldpc_vnu #(.DV(DV), .Q(Q)) u_vnu (.ch(ch[j]), .c2v(cin), .v2c(vout), .hd(hd_w[j]));
  end
endmodule
