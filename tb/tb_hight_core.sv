// tb_hight_core: self-checking testbench of the HIGHT-128 core.
//
// Encrypts the two published HIGHT test vectors and a set of random blocks
// and compares each ciphertext with a behavioural model of the cipher
// written here directly from the HIGHT definition (whitening keys, delta
// LFSR, subkeys, 32 rounds with explicit byte rotation), independent of the
// core's address tricks. Also checks the handshake timing: 24 input cycles
// and 160 cycles from the first key byte to the last ciphertext byte.
module tb_hight_core;
  import hight_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] din = '0, dout;
  logic       din_ready, dout_valid, busy, done;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  hight_core dut (.*);

  // ---------------- reference model ----------------
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

  task automatic encrypt(input logic [127:0] key, input logic [63:0] pt, output logic [63:0] ct,
                         output int cycles);
    int n_in = 0, n_out = 0, t0 = 0, t = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (n_out < 8) begin
      if (din_ready) din = (n_in < 16) ? key[8*n_in +: 8] : pt[8*(n_in-16) +: 8];
      else           din = 8'h00;
      @(posedge clk);
      if (din_ready) begin
        if (n_in == 0) t0 = t;
        n_in++;
      end
      if (dout_valid) begin ct[8*n_out +: 8] = dout; n_out++; end
      t++;
      @(negedge clk);
    end
    cycles = t - t0;
    checks++;
    if (n_in != 24) begin failures++; $display("FAIL: %0d input bytes taken", n_in); end
  endtask

  task automatic run(input logic [127:0] key, input logic [63:0] pt, input logic [63:0] expect_ct);
    logic [63:0] ct;
    int cyc;
    encrypt(key, pt, ct, cyc);
    checks++;
    if (ct !== expect_ct) begin
      failures++;
      $display("FAIL: key=%h pt=%h got %h expected %h", key, pt, ct, expect_ct);
    end
    checks++;
    if (cyc != 160) begin failures++; $display("FAIL: block took %0d cycles, expected 160", cyc); end
    @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: still busy after block"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // published HIGHT test vectors
    run(128'h00112233445566778899aabbccddeeff, 64'h0000000000000000, 64'h00f418aed94f03f2);
    run(128'hffeeddccbbaa99887766554433221100, 64'h0011223344556677, 64'h23ce9f72e543e6d8);
    // the model must agree with the published vectors too
    checks++;
    if (ref_hight(128'h00112233445566778899aabbccddeeff, 64'h0) !== 64'h00f418aed94f03f2) failures++;
    for (int i = 0; i < 20; i++) begin
      logic [127:0] key;
      logic [63:0]  pt;
      key = {$urandom, $urandom, $urandom, $urandom};
      pt  = {$urandom, $urandom};
      run(key, pt, ref_hight(key, pt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
