// lw_crypto_top: two area-efficient block cipher cores side by side.
//
// The 8-bit HIGHT-128 core and the 16-bit PRESENT-128 core are independent
// 64-bit block ciphers with 128-bit keys; they share only the clock and
// reset and each has its own load/output ports. See hight_core and
// present_core for the protocols: HIGHT takes 16 key bytes and 8 plaintext
// bytes and returns 8 ciphertext bytes 160 cycles after its first key byte;
// PRESENT takes 8 key words and 4 plaintext words and returns 4 ciphertext
// words 260 cycles after its first key word, and can run blocks back to back
// every 256 cycles (present_start_ready).
module lw_crypto_top (
  input  logic        clk,
  input  logic        rst_n,
  // HIGHT-128, 8-bit datapath
  input  logic        hight_start,
  input  logic [7:0]  hight_din,
  output logic        hight_din_ready,
  output logic [7:0]  hight_dout,
  output logic        hight_dout_valid,
  output logic        hight_busy,
  output logic        hight_done,
  // PRESENT-128, 16-bit datapath
  input  logic        present_start,
  input  logic [15:0] present_din,
  output logic        present_din_ready,
  output logic [15:0] present_dout,
  output logic        present_dout_valid,
  output logic        present_busy,
  output logic        present_done,
  output logic        present_start_ready
);
  hight_core u_hight (
    .clk, .rst_n, .start(hight_start), .din(hight_din), .din_ready(hight_din_ready),
    .dout(hight_dout), .dout_valid(hight_dout_valid), .busy(hight_busy), .done(hight_done)
  );

  present_core u_present (
    .clk, .rst_n, .start(present_start), .din(present_din), .din_ready(present_din_ready),
    .dout(present_dout), .dout_valid(present_dout_valid), .busy(present_busy), .done(present_done),
    .start_ready(present_start_ready)
  );
endmodule
