// tb_carbon_alu: random operands for every opcode and width, compared with
// a reference model written from the opcode definitions.
module tb_carbon_alu;
  import carbon_pkg::*;
  op_e op; logic [4:0] wm1; word_t a, b, y; logic [15:0] imm;
  int checks = 0, failures = 0;

  carbon_alu dut (.op(op), .width_m1(wm1), .a(a), .b(b), .imm(imm), .y(y));

  function automatic word_t ref_model(int o, int w, word_t x, word_t z, logic [15:0] im);
    longint unsigned r;
    case (o)
      1: r = x + z;            2: r = x - z;        3: r = x * z;
      4: r = x & z;            5: r = x | z;        6: r = x ^ z;
      7: r = ~x;               8: r = x << z[4:0];  9: r = x >> z[4:0];
      10: r = word_t'($signed(x) >>> z[4:0]);
      11: r = (x == z);        12: r = (x != z);    13: r = (x < z);
      14: r = ($signed(x) < $signed(z));
      15: r = x;               16: r = im;          17: r = {im, x[15:0]};
      18: r = x + im;          19: r = z;           20: r = x;
      default: r = 0;
    endcase
    r = r & ((64'd1 << (w + 1)) - 1);
    return word_t'(r);
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op  = op_e'(n % 21);
      wm1 = (n % 3 == 0) ? 5'd31 : 5'($urandom_range(0, 31));
      a = $urandom; b = (n % 5 == 0) ? word_t'($urandom_range(0, 40)) : $urandom;
      imm = 16'($urandom);
      #1;
      checks++;
      if (y !== ref_model(int'(op), int'(wm1), a, b, imm)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d w=%0d a=%h b=%h y=%h", op, wm1, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
