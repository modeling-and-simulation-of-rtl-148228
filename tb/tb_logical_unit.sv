// tb_logical_unit: random operands for and, nor, xor, and_not, rol, ror,
// shl and shr, compared with a bit-by-bit model of each operation (shift
// amount = low five bits of source2). Shift amounts 0 and 31 are included.
module tb_logical_unit;
  import rttp_pkg::*;
  dp_op_e op;
  logic [31:0] a, b, result, expv;
  int checks = 0, failures = 0;
  dp_op_e ops [8] = '{OP_AND, OP_NOR, OP_XOR, OP_ANDN, OP_ROL, OP_ROR, OP_SHL, OP_SHR};

  logical_unit dut (.*);

  function automatic logic [31:0] ref_op(dp_op_e o, logic [31:0] x, logic [31:0] y);
    logic [31:0] r;
    int s;
    s = int'(y[4:0]);
    for (int i = 0; i < 32; i++) begin
      case (o)
        OP_AND:  r[i] = x[i] & y[i];
        OP_NOR:  r[i] = !(x[i] | y[i]);
        OP_XOR:  r[i] = x[i] ^ y[i];
        OP_ANDN: r[i] = x[i] & !y[i];
        OP_ROL:  r[i] = x[(i - s + 32) % 32];
        OP_ROR:  r[i] = x[(i + s) % 32];
        OP_SHL:  r[i] = (i - s >= 0) ? x[i - s] : 1'b0;
        default: r[i] = (i + s < 32) ? x[i + s] : 1'b0;
      endcase
    end
    return r;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = ops[i % 8];
      a = $urandom;
      b = $urandom;
      if (i % 40 < 8) b[4:0] = 5'd0;
      else if (i % 40 < 16) b[4:0] = 5'd31;
      #1;
      expv = ref_op(op, a, b);
      checks++;
      if (result !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL %s %h %h: %h vs %h", op.name(), a, b, result, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
