// tb_present_core: self-checking testbench of the PRESENT-128 core.
//
// Encrypts the four published PRESENT-128 test vectors (all-zero and
// all-one keys and plaintexts) and random blocks, comparing with a
// behavioural model written here from the PRESENT definition (64-bit
// round key, S-box layer, bit permutation P(i) = 16*i mod 63, 128-bit key
// update). Checks the handshake: 12 input words, and 260 cycles from the
// first key word to the last ciphertext word (256 for key load and rounds).
// A second test streams blocks back to back, starting each new block in the
// last round cycle of the previous one, and checks that consecutive blocks
// start exactly 256 cycles apart and still encrypt correctly.
module tb_present_core;
  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] din = '0, dout;
  logic        din_ready, dout_valid, busy, done, start_ready;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  present_core dut (.*);

  localparam logic [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                     4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

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

  task automatic run(input logic [127:0] key, input logic [63:0] pt, input logic [63:0] expect_ct);
    int n_in = 0, n_out = 0, t0 = 0, t = 0;
    logic [63:0] ct;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (n_out < 4) begin
      if (din_ready) din = (n_in < 8) ? key[127 - 16*n_in -: 16] : pt[63 - 16*(n_in-8) -: 16];
      else           din = 16'h0;
      @(posedge clk);
      if (din_ready) begin
        if (n_in == 0) t0 = t;
        n_in++;
      end
      if (dout_valid) begin ct[63 - 16*n_out -: 16] = dout; n_out++; end
      t++;
      @(negedge clk);
    end
    checks++;
    if (n_in != 12) begin failures++; $display("FAIL: %0d input words taken", n_in); end
    checks++;
    if (ct !== expect_ct) begin
      failures++;
      $display("FAIL: key=%h pt=%h got %h expected %h", key, pt, ct, expect_ct);
    end
    checks++;
    if (t - t0 != 260) begin failures++; $display("FAIL: block took %0d cycles, expected 260", t - t0); end
    @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: still busy after block"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run('0, 64'h0, 64'h96db702a2e6900af);
    run('0, '1, 64'h3c6019e5e5edd563);
    run('1, 64'h0, 64'h13238c710272a5d8);
    run('1, '1, 64'h628d9fbd4218e5b4);
    checks++;
    if (ref_present('0, 64'h0) !== 64'h96db702a2e6900af) failures++;
    for (int i = 0; i < 20; i++) begin
      logic [127:0] key;
      logic [63:0]  pt;
      key = {$urandom, $urandom, $urandom, $urandom};
      pt  = {$urandom, $urandom};
      run(key, pt, ref_present(key, pt));
    end
    stream(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // back-to-back blocks: start whenever start_ready allows it
  task automatic stream(input int n);
    logic [127:0] key [8];
    logic [63:0]  pt [8], ct [8];
    logic [15:0]  words [96];
    int t = 0, started = 0, n_in = 0, n_out = 0;
    int tfirst [8];
    for (int b = 0; b < n; b++) begin
      key[b] = {$urandom, $urandom, $urandom, $urandom};
      pt[b]  = {$urandom, $urandom};
      for (int w = 0; w < 8; w++) words[12*b + w] = key[b][127 - 16*w -: 16];
      for (int w = 0; w < 4; w++) words[12*b + 8 + w] = pt[b][63 - 16*w -: 16];
    end
    @(negedge clk);
    while (n_out < 4*n) begin
      start = start_ready && (started < n) && (started == 0 || busy);
      din   = din_ready ? words[n_in] : 16'h0;
      @(posedge clk);
      if (start) started++;
      if (din_ready) begin
        if (n_in % 12 == 0) tfirst[n_in / 12] = t;
        n_in++;
      end
      if (dout_valid) begin ct[n_out / 4][63 - 16*(n_out % 4) -: 16] = dout; n_out++; end
      t++;
      @(negedge clk);
    end
    start = 1'b0;
    for (int b = 0; b < n; b++) begin
      checks++;
      if (ct[b] !== ref_present(key[b], pt[b])) begin
        failures++; $display("FAIL stream block %0d: %h", b, ct[b]);
      end
      if (b > 0) begin
        checks++;
        if (tfirst[b] - tfirst[b-1] != 256) begin
          failures++; $display("FAIL stream block %0d started %0d cycles after the previous", b, tfirst[b] - tfirst[b-1]);
        end
      end
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
