// Error-rate run of the full-size decoder over a BPSK / AWGN channel.
// Random codewords (reference encoder) are sent as +1/-1 symbols with Gaussian noise
// (Box-Muller from $urandom) at Eb/N0 = 1, 2 and 3 dB for the rate-1/2 code
// (noise variance 1 / (2 * R * Eb/N0)). Received values are scaled by 8 and saturated to
// the 6-bit message range; the decoder runs its 8 iterations. For every point the bit error
// rate before and after decoding is printed. Checks: decoding lowers the error rate at 2 and
// 3 dB, and at 3 dB fewer than 1 bit in 1000 is wrong after decoding.
module tb_bldpc_ber;
  import bldpc_code_pkg::*;
  import bldpc_ref_pkg::*;
  localparam int unsigned Q = 6, ITER = 8;
  localparam int NPT = 3;
  localparam int FRAMES = 12;
  localparam real EBN0_DB [NPT] = '{1.0, 2.0, 3.0};
  localparam real RATE = 0.5;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                llr_we, start, busy, done;
  logic [PW-1:0]       llr_addr, hd_addr;
  logic signed [Q-1:0] llr_in [N];
  logic [N-1:0]        hd_out;
  bldpc_decoder u_dut (.clk, .rst_n, .llr_we, .llr_addr, .llr_in,
    .start, .busy, .done, .hd_addr, .hd_out);

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (NPT * FRAMES * 700 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    llr_we = 0; start = 0; hd_addr = '0; llr_addr = '0;
    foreach (llr_in[j]) llr_in[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int pt = 0; pt < NPT; pt++) begin
      real sigma;
      longint raw_err, dec_err, nbits;
      int frame_err;
      sigma = $sqrt(1.0 / (2.0 * RATE * $pow(10.0, EBN0_DB[pt] / 10.0)));
      raw_err = 0; dec_err = 0; nbits = 0; frame_err = 0;
      for (int f = 0; f < FRAMES; f++) begin
        cw_t info, cw;
        int fe;
        for (int j = 0; j < N; j++) info[j] = (j < NI) ? P'({$urandom, $urandom}) : '0;
        cw = encode(info);
        for (int b = 0; b < int'(P); b++) begin
          llr_we = 1; llr_addr = PW'(b);
          for (int j = 0; j < N; j++) begin
            real y;
            int qv;
            y = (cw[j][b] ? -1.0 : 1.0) + sigma * gauss();
            qv = int'(y * 8.0);
            if (qv > 31) qv = 31;
            if (qv < -31) qv = -31;
            llr_in[j] = Q'(qv);
            if ((y < 0.0) != cw[j][b]) raw_err++;
          end
          @(negedge clk);
        end
        llr_we = 0;
        start = 1;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        fe = 0;
        for (int b = 0; b < int'(P); b++) begin
          hd_addr = PW'(b);
          #1;
          for (int j = 0; j < N; j++) if (hd_out[j] != cw[j][b]) fe++;
        end
        dec_err += fe;
        if (fe > 0) frame_err++;
        nbits += N * P;
        @(negedge clk);
      end
      $display("Eb/N0 %3.1f dB: channel BER %.2e, decoded BER %.2e, frames in error %0d of %0d",
               EBN0_DB[pt], real'(raw_err) / real'(nbits), real'(dec_err) / real'(nbits), frame_err, FRAMES);
      if (pt > 0) check(dec_err < raw_err, $sformatf("decoding helps at %.1f dB", EBN0_DB[pt]));
      if (pt == NPT - 1) check(real'(dec_err) / real'(nbits) < 1.0e-3, "decoded BER below 1e-3 at 3 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
