// tb_present_key_sched: loads a random 128-bit key in eight 16-bit words,
// then drives the key register through 31 rounds the way the core does
// (four shifts with slice 0..3 and the round number, then four holds) and
// checks every 16-bit round-key slice against the PRESENT-128 key schedule
// computed here, then the four slices of the last round key (round number
// 0). The last key is read once with shifts and once with loads of a new
// key, which must deliver the same slices; the new key is then checked
// through its first round.
module tb_present_key_sched;
  import present_pkg::*;
  logic         clk = 1'b0;
  present_kop_t op = KOP_HOLD;
  logic [15:0]  din = '0, rk;
  logic [1:0]   slice = '0;
  logic [4:0]   rnd = 5'd1;
  logic [127:0] key, key2;
  int checks = 0, failures = 0;
  localparam logic [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                     4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  always #5 clk = ~clk;

  present_key_sched dut (.*);

  function automatic logic [127:0] next_key(logic [127:0] k, int r);
    k = {k[66:0], k[127:67]};
    k[127:124] = SB[k[127:124]];
    k[123:120] = SB[k[123:120]];
    k[66:62] ^= 5'(r);
    return k;
  endfunction

  // four slices of one round; with load_next, shifts in key2 words w..w+3
  task automatic round_slices(logic [127:0] k, int r, bit load_next, int w);
    for (int c = 0; c < 4; c++) begin
      op = load_next ? KOP_LOAD : KOP_SHIFT;
      din = key2[127 - 16*(w + c) -: 16];
      slice = 2'(c); rnd = 5'(r);
      #1;
      checks++;
      if (rk !== k[127 - 16*c -: 16]) begin
        failures++; $display("FAIL round %0d slice %0d: %h vs %h", r, c, rk, k[127 - 16*c -: 16]);
      end
      @(negedge clk);
    end
    op = KOP_HOLD;
    repeat (4) @(negedge clk);
  endtask

  task automatic load_words(logic [127:0] k, int from, int to);
    for (int w = from; w < to; w++) begin
      op = KOP_LOAD; din = k[127 - 16*w -: 16]; rnd = 5'd1;
      @(negedge clk);
    end
  endtask

  initial begin
    @(negedge clk);
    key = {$urandom, $urandom, $urandom, $urandom};
    load_words(key, 0, 8);
    for (int t = 0; t < 6; t++) begin
      key2 = {$urandom, $urandom, $urandom, $urandom};
      for (int r = 1; r <= 31; r++) begin
        round_slices(key, r, 1'b0, 0);
        key = next_key(key, r);
      end
      // odd runs: plain read of the final key, then a full reload;
      // even runs: final key read while the first half of key2 loads
      if (t % 2) begin
        round_slices(key, 0, 1'b0, 0);
        load_words(key2, 0, 8);
      end else begin
        round_slices(key, 0, 1'b1, 0);
        load_words(key2, 4, 8);
      end
      key = key2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
