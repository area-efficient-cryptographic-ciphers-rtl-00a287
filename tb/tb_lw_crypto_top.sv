// tb_lw_crypto_top: end-to-end test of the top level with both cipher cores
// running at the same time, at their default (and only) sizes.
//
// A HIGHT driver and a PRESENT driver run in parallel, each encrypting its
// published test vectors followed by random blocks, with the start of each
// PRESENT block offset by a random delay so that the cores overlap in many
// different phase alignments. Ciphertexts are compared with behavioural
// models of both ciphers written here from their definitions. The test
// counts how often each mechanism of the two cores was exercised and fails
// any that never happened: HIGHT whitening on the way in and on the way
// out, the held key counter that rotates the subkey order, round cycles of
// both F0 and F1 type; PRESENT plaintext entry through the Data-in
// multiplexer, the A/B 3-bit key write-back, SR2-to-SR1
// copy cycles, the final key addition on output, and back-to-back PRESENT
// blocks whose key load overlaps the previous block's output (blocks then
// start every 256 cycles, which is checked).
module tb_lw_crypto_top;
  import hight_pkg::*;
  import present_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        hight_start = 1'b0, present_start = 1'b0;
  logic [7:0]  hight_din = '0, hight_dout;
  logic [15:0] present_din = '0, present_dout;
  logic        hight_din_ready, hight_dout_valid, hight_busy, hight_done;
  logic        present_din_ready, present_dout_valid, present_busy, present_done, present_start_ready;
  int          checks = 0, failures = 0;
  int          n_hwk_in = 0, n_hwk_out = 0, n_hhold = 0, n_hf0 = 0, n_hf1 = 0;
  int          n_pdin = 0, n_pupd = 0, n_pcopy = 0, n_pout = 0, n_overlap = 0, n_pchain = 0;
  bit          h_finished = 0, p_finished = 0;

  localparam int N_RANDOM = 12;

  always #5 clk = ~clk;

  lw_crypto_top dut (.*);

  localparam logic [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                     4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  // ---------------- reference models ----------------
  function automatic logic [63:0] ref_hight(input logic [127:0] key, input logic [63:0] pt);
    logic [7:0] K [16];
    logic [7:0] WK [8];
    logic [7:0] SK [128];
    logic [7:0] X [8], N [8];
    logic [6:0] d;
    logic [63:0] c;
    for (int i = 0; i < 16; i++) K[i] = key[8*i +: 8];
    for (int i = 0; i < 4; i++) begin WK[i] = K[i+12]; WK[i+4] = K[i]; end
    d = 7'h5A;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 16; j++) begin
        SK[16*i+j] = (j < 8) ? K[(j - i + 8) % 8] + 8'(d) : K[(j - i + 8) % 8 + 8] + 8'(d);
        d = {d[3] ^ d[0], d[6:1]};
      end
    for (int i = 0; i < 8; i++) X[i] = pt[8*i +: 8];
    X[0] = X[0] + WK[0]; X[2] = X[2] ^ WK[1]; X[4] = X[4] + WK[2]; X[6] = X[6] ^ WK[3];
    for (int r = 0; r < 32; r++) begin
      N[1] = X[0]; N[3] = X[2]; N[5] = X[4]; N[7] = X[6];
      N[0] = X[7] ^ (hight_f0(X[6]) + SK[4*r+3]);
      N[2] = X[1] + (hight_f1(X[0]) ^ SK[4*r]);
      N[4] = X[3] ^ (hight_f0(X[2]) + SK[4*r+1]);
      N[6] = X[5] + (hight_f1(X[4]) ^ SK[4*r+2]);
      if (r == 31) for (int j = 0; j < 8; j++) X[j] = N[(j + 1) % 8];
      else         for (int j = 0; j < 8; j++) X[j] = N[j];
    end
    X[0] = X[0] + WK[4]; X[2] = X[2] ^ WK[5]; X[4] = X[4] + WK[6]; X[6] = X[6] ^ WK[7];
    for (int i = 0; i < 8; i++) c[8*i +: 8] = X[i];
    return c;
  endfunction

  function automatic logic [63:0] ref_present(input logic [127:0] key, input logic [63:0] pt);
    logic [63:0]  s, t;
    logic [127:0] k;
    s = pt;
    k = key;
    for (int r = 1; r <= 31; r++) begin
      s = s ^ k[127:64];
      for (int i = 0; i < 16; i++) s[4*i +: 4] = SB[s[4*i +: 4]];
      for (int i = 0; i < 64; i++) t[(i == 63) ? 63 : (16 * i) % 63] = s[i];
      s = t;
      k = {k[66:0], k[127:67]};
      k[127:124] = SB[k[127:124]];
      k[123:120] = SB[k[123:120]];
      k[66:62]   = k[66:62] ^ 5'(r);
    end
    return s ^ k[127:64];
  endfunction

  // ---------------- drivers ----------------
  task automatic hight_block(input logic [127:0] key, input logic [63:0] pt, input logic [63:0] e);
    int n_in = 0, n_out = 0, t = 0, t0 = 0;
    logic [63:0] ct;
    @(negedge clk) hight_start = 1'b1;
    @(negedge clk) hight_start = 1'b0;
    while (n_out < 8) begin
      hight_din = !hight_din_ready ? 8'h00 : (n_in < 16) ? key[8*n_in +: 8] : pt[8*(n_in-16) +: 8];
      @(posedge clk);
      if (hight_din_ready) begin if (n_in == 0) t0 = t; n_in++; end
      if (hight_dout_valid) begin ct[8*n_out +: 8] = hight_dout; n_out++; end
      t++;
      @(negedge clk);
    end
    checks += 2;
    if (ct !== e) begin failures++; $display("FAIL HIGHT key=%h pt=%h got %h exp %h", key, pt, ct, e); end
    if (t - t0 != 160) begin failures++; $display("FAIL HIGHT %0d cycles", t - t0); end
  endtask

  task automatic present_block(input logic [127:0] key, input logic [63:0] pt, input logic [63:0] e);
    int n_in = 0, n_out = 0, t = 0, t0 = 0;
    logic [63:0] ct;
    @(negedge clk) present_start = 1'b1;
    @(negedge clk) present_start = 1'b0;
    while (n_out < 4) begin
      present_din = !present_din_ready ? 16'h0 :
                    (n_in < 8) ? key[127 - 16*n_in -: 16] : pt[63 - 16*(n_in-8) -: 16];
      @(posedge clk);
      if (present_din_ready) begin if (n_in == 0) t0 = t; n_in++; end
      if (present_dout_valid) begin ct[63 - 16*n_out -: 16] = present_dout; n_out++; end
      t++;
      @(negedge clk);
    end
    checks += 2;
    if (ct !== e) begin failures++; $display("FAIL PRESENT key=%h pt=%h got %h exp %h", key, pt, ct, e); end
    if (t - t0 != 260) begin failures++; $display("FAIL PRESENT %0d cycles", t - t0); end
  endtask

  // PRESENT blocks back to back, each started in the previous one's last round cycle
  task automatic present_stream(input int n);
    logic [127:0] key [4];
    logic [63:0]  pt [4], ct [4];
    logic [15:0]  words [48];
    int t = 0, started = 0, n_in = 0, n_out = 0;
    int tfirst [4];
    for (int b = 0; b < n; b++) begin
      key[b] = {$urandom, $urandom, $urandom, $urandom};
      pt[b]  = {$urandom, $urandom};
      for (int w = 0; w < 8; w++) words[12*b + w] = key[b][127 - 16*w -: 16];
      for (int w = 0; w < 4; w++) words[12*b + 8 + w] = pt[b][63 - 16*w -: 16];
    end
    @(negedge clk);
    while (n_out < 4*n) begin
      present_start = present_start_ready && (started < n) && (started == 0 || present_busy);
      present_din   = present_din_ready ? words[n_in] : 16'h0;
      @(posedge clk);
      if (present_start) started++;
      if (present_din_ready) begin
        if (n_in % 12 == 0) tfirst[n_in / 12] = t;
        n_in++;
      end
      if (present_dout_valid) begin
        ct[n_out / 4][63 - 16*(n_out % 4) -: 16] = present_dout;
        n_out++;
      end
      t++;
      @(negedge clk);
    end
    present_start = 1'b0;
    for (int b = 0; b < n; b++) begin
      checks++;
      if (ct[b] !== ref_present(key[b], pt[b])) begin
        failures++; $display("FAIL PRESENT stream block %0d: %h", b, ct[b]);
      end
      if (b > 0) begin
        checks++;
        if (tfirst[b] - tfirst[b-1] != 256) begin
          failures++; $display("FAIL PRESENT stream block %0d after %0d cycles", b, tfirst[b] - tfirst[b-1]);
        end
      end
    end
  endtask

  // ---------------- mechanism counters ----------------
  always @(posedge clk) if (rst_n) begin
    if (dut.u_hight.phase == PH_LOAD  && dut.u_hight.op inside {OP_ADD_WK, OP_XOR_WK}) n_hwk_in++;
    if (dut.u_hight.phase == PH_FINAL && dut.u_hight.op inside {OP_ADD_WK, OP_XOR_WK}) n_hwk_out++;
    if (dut.u_hight.key_use && dut.u_hight.key_hold) n_hhold++;
    if (dut.u_hight.op == OP_RND_F0) n_hf0++;
    if (dut.u_hight.op == OP_RND_F1) n_hf1++;
    if (dut.u_present.sop == SOP_COMPUTE && dut.u_present.first_round) n_pdin++;
    if (dut.u_present.kop == KOP_SHIFT && dut.u_present.cyc == 3'd3 &&
        dut.u_present.round_ctr != 5'd1) n_pupd++;
    if (dut.u_present.sop == SOP_COPY) n_pcopy++;
    if (dut.u_present.sop == SOP_OUT) n_pout++;
    if (hight_busy && present_busy) n_overlap++;
    if (dut.u_present.sop == SOP_OUT && dut.u_present.kop == KOP_LOAD) n_pchain++;
  end

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", name); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      begin
        hight_block(128'h00112233445566778899aabbccddeeff, 64'h0, 64'h00f418aed94f03f2);
        hight_block(128'hffeeddccbbaa99887766554433221100, 64'h0011223344556677, 64'h23ce9f72e543e6d8);
        for (int i = 0; i < N_RANDOM; i++) begin
          logic [127:0] k;
          logic [63:0]  p;
          k = {$urandom, $urandom, $urandom, $urandom};
          p = {$urandom, $urandom};
          hight_block(k, p, ref_hight(k, p));
        end
        h_finished = 1;
      end
      begin
        present_block('0, 64'h0, 64'h96db702a2e6900af);
        present_block('1, '1, 64'h628d9fbd4218e5b4);
        for (int i = 0; i < N_RANDOM; i++) begin
          logic [127:0] k;
          logic [63:0]  p;
          repeat ($urandom % 37) @(negedge clk);
          k = {$urandom, $urandom, $urandom, $urandom};
          p = {$urandom, $urandom};
          present_block(k, p, ref_present(k, p));
        end
        present_stream(4);
        p_finished = 1;
      end
    join
    mech("HIGHT initial whitening", n_hwk_in);
    mech("HIGHT final whitening", n_hwk_out);
    mech("HIGHT key counter hold", n_hhold);
    mech("HIGHT F0 round cycles", n_hf0);
    mech("HIGHT F1 round cycles", n_hf1);
    mech("PRESENT Data-in first round", n_pdin);
    mech("PRESENT A/B 3-bit key write-back", n_pupd);
    mech("PRESENT SR2->SR1 copy", n_pcopy);
    mech("PRESENT output key addition", n_pout);
    mech("both cores busy at once", n_overlap);
    mech("PRESENT back-to-back blocks", n_pchain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (hight done %0d, present done %0d)", h_finished, p_finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
