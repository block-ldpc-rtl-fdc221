// End-to-end testbench of bldpc_top at its default (full) size: information frames are
// pushed into the encoder back to back, every parity frame it emits is joined with its
// information bits into a codeword, sent through a channel model (confidence 6..20 with
// the right sign, then NERR bits turned into weak wrong decisions) and decoded. Decoded
// bits must equal the codeword, every encoded codeword must have a zero syndrome, encoder
// latency must be 7 epochs and decoder latency 1 + p*(1 + 2*ITER) cycles.
// Counted mechanisms (each must occur): several frames inside the encoder pipeline at
// once, the decoder taking the next frame into its second channel bank while decoding,
// and the decoder correcting channel errors.
module tb_bldpc_top;
  import bldpc_code_pkg::*;
  import bldpc_ref_pkg::*;
  localparam int unsigned Q = 6, ITER = 8;
  localparam int unsigned EPOCH = ((L_AC > K - 1) ? L_AC : K - 1) * P;
  localparam int NF = 4;
  localparam int NERR = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                enc_in_ready, enc_in_valid, enc_out_valid;
  logic [NI-1:0]       enc_z1;
  logic [PW-1:0]       enc_out_addr;
  logic [M-1:0]        enc_par;
  logic                dec_llr_we, dec_start, dec_busy, dec_done;
  logic [PW-1:0]       dec_llr_addr, dec_hd_addr;
  logic signed [Q-1:0] dec_llr [N];
  logic [N-1:0]        dec_hd;

  bldpc_top u_dut (.clk, .rst_n,
    .enc_in_ready, .enc_in_valid, .enc_z1, .enc_out_valid, .enc_out_addr, .enc_par,
    .dec_llr_we, .dec_llr_addr, .dec_llr, .dec_start, .dec_busy, .dec_done,
    .dec_hd_addr, .dec_hd);

  cw_t    info [NF];
  cw_t    cw [NF];
  int     llr [NF][N][P];
  longint t_in [NF];
  longint cyc = 0;
  int     n_enc = 0, ocnt = 0, max_inflight = 0, n_load_busy = 0, n_corrected = 0, n_dec = 0;
  cw_t    cap;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (12 * EPOCH + NF * 1200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encoder source
  initial begin
    for (int f = 0; f < NF; f++)
      for (int j = 0; j < N; j++) info[f][j] = (j < NI) ? P'({$urandom, $urandom}) : '0;
    enc_in_valid = 0; enc_z1 = '0;
    wait (rst_n);
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      while (!(enc_in_ready && u_dut.u_enc.bitc == 0)) @(negedge clk);
      t_in[f] = cyc;
      for (int b = 0; b < int'(P); b++) begin
        enc_in_valid = 1;
        for (int j = 0; j < NI; j++) enc_z1[j] = info[f][j][b];
        if (b < int'(P) - 1) @(negedge clk);
      end
      if (f + 1 - n_enc > max_inflight) max_inflight = f + 1 - n_enc;
      @(negedge clk);
      enc_in_valid = 0;
    end
  end

  // encoder sink and channel
  always @(negedge clk) if (rst_n && enc_out_valid) begin
    if (ocnt == 0) check(cyc - t_in[n_enc] == longint'(7 * EPOCH), $sformatf("encoder latency frame %0d", n_enc));
    for (int i = 0; i < M; i++) cap[NI + i][enc_out_addr] = enc_par[i];
    ocnt++;
    if (ocnt == int'(P)) begin
      cw[n_enc] = info[n_enc];
      for (int unsigned j = NI; j < N; j++) cw[n_enc][j] = cap[j];
      check(syndrome_weight(cw[n_enc]) == 0, $sformatf("encoded frame %0d is a codeword", n_enc));
      for (int j = 0; j < N; j++)
        for (int b = 0; b < P; b++) begin
          int mag;
          mag = int'($urandom_range(6, 20));
          llr[n_enc][j][b] = cw[n_enc][j][b] ? -mag : mag;
        end
      for (int e = 0; e < NERR; e++) begin
        int j, b, mag;
        j = int'($urandom_range(0, N - 1));
        b = int'($urandom_range(0, P - 1));
        mag = int'($urandom_range(1, 5));
        llr[n_enc][j][b] = cw[n_enc][j][b] ? mag : -mag;
      end
      n_enc++;
      ocnt = 0;
    end
  end

  // decoder side: load frame f while frame f-1 decodes, then start it
  initial begin
    dec_llr_we = 0; dec_start = 0; dec_hd_addr = '0; dec_llr_addr = '0;
    foreach (dec_llr[j]) dec_llr[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f <= NF; f++) begin
      int lat;
      if (f < NF) begin
        while (n_enc <= f) @(negedge clk);
        for (int b = 0; b < int'(P); b++) begin
          dec_llr_we = 1; dec_llr_addr = PW'(b);
          for (int j = 0; j < N; j++) dec_llr[j] = Q'(llr[f][j][b]);
          if (dec_busy) n_load_busy++;
          @(negedge clk);
        end
        dec_llr_we = 0;
      end
      if (f > 0) begin
        int wrong, chan_wrong;
        while (!dec_done) @(negedge clk);
        wrong = 0; chan_wrong = 0;
        for (int b = 0; b < int'(P); b++) begin
          dec_hd_addr = PW'(b);
          #1;
          for (int j = 0; j < N; j++) begin
            if (dec_hd[j] != cw[f-1][j][b]) wrong++;
            if ((llr[f-1][j][b] < 0) != cw[f-1][j][b]) chan_wrong++;
          end
        end
        check(wrong == 0, $sformatf("frame %0d: %0d wrong bits after decoding (%0d before)", f - 1, wrong, chan_wrong));
        if (chan_wrong > 0 && wrong == 0) n_corrected++;
        n_dec++;
        @(negedge clk);
      end
      if (f < NF) begin
        dec_start = 1;
        @(negedge clk);
        dec_start = 0;
        lat = 1;
        fork : g_lat
          begin
            while (!dec_done) begin @(negedge clk); lat++; end
            check(lat == 1 + int'(P * (1 + 2 * ITER)), $sformatf("decoder latency %0d", lat));
          end
        join_none
      end
    end
    check(n_dec == NF, "all frames decoded");
    check(max_inflight >= 2, $sformatf("frames in encoder pipeline at once: %0d", max_inflight));
    check(n_load_busy > 0, "decoder loaded next frame while busy");
    check(n_corrected > 0, "decoder corrected channel errors");
    $display("encoded=%0d decoded=%0d enc_in_flight=%0d load_while_busy=%0d corrected=%0d",
             n_enc, n_dec, max_inflight, n_load_busy, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
