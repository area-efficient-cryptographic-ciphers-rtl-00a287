// tb_hight_round_fn: drives the combinational byte datapath with random
// bytes for every operation and compares with the HIGHT formulas, with F0
// and F1 written out here bit by bit from their rotation definitions.
module tb_hight_round_fn;
  import hight_pkg::*;
  hight_op_t  op;
  logic [7:0] x_a, x_b, key_byte, y, sk, e;
  logic [6:0] delta;
  int         checks = 0, failures = 0;

  hight_round_fn dut (.*);

  function automatic logic [7:0] rot(logic [7:0] x, int n);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[(i + n) % 8] = x[i];
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      op = hight_op_t'(n % 5);
      x_a = 8'($urandom); x_b = 8'($urandom); key_byte = 8'($urandom); delta = 7'($urandom);
      #1;
      sk = 8'((int'(key_byte) + int'(delta)) % 256);
      case (op)
        OP_PASS:   e = x_a;
        OP_ADD_WK: e = 8'((int'(x_a) + int'(key_byte)) % 256);
        OP_XOR_WK: e = x_a ^ key_byte;
        OP_RND_F1: e = 8'((int'(x_a) + int'((rot(x_b,3) ^ rot(x_b,4) ^ rot(x_b,6)) ^ sk)) % 256);
        default:   e = x_a ^ 8'((int'(rot(x_b,1) ^ rot(x_b,2) ^ rot(x_b,7)) + int'(sk)) % 256);
      endcase
      checks++;
      if (y !== e) begin failures++; $display("FAIL op=%0d got %h expected %h", op, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
