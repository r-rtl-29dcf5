// Self-checking testbench of the ALU: every published opcode, call/return
// and an undefined opcode, with directed corner values and random operands,
// against expected values computed here.
module tb_aero_alu;
  import aero_pkg::*;

  logic [6:0] opcode;
  word_t a, b, y;
  logic wr, j, c, r;
  int checks = 0, failures = 0;

  aero_alu dut (.opcode(opcode), .op_a(a), .op_b(b), .result(y), .wr_en(wr),
                .j_en(j), .call_en(c), .ret_en(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [6:0] op, word_t va, word_t vb);
    word_t ey; logic ewr, ej, ec, er;
    int signed sa, sb;
    sa = va; sb = vb;
    ey = '0; ewr = 0; ej = 0; ec = 0; er = 0;
    case (op)
      7'h11: begin ey = va + vb; ewr = 1; end
      7'h12: begin ey = va - vb; ewr = 1; end
      7'h13: begin ey = word_t'(64'(va) * 64'(vb)); ewr = 1; end
      7'h31: begin ey = va ^ vb; ewr = 1; end
      7'h32: begin ey = va & vb; ewr = 1; end
      7'h33: begin ey = va | vb; ewr = 1; end
      7'h34: begin ey = va >> (vb % 32); ewr = 1; end
      7'h35: begin ey = va << (vb % 32); ewr = 1; end
      7'h21: ej = sa <= sb;
      7'h22: ej = sa >= sb;
      7'h23: ej = sa < sb;
      7'h24: ej = sa > sb;
      7'h25: ej = va == vb;
      7'h26: ej = va != vb;
      7'h27: ej = 1;
      7'h28: ec = 1;
      7'h29: er = 1;
      default: ;
    endcase
    opcode = op; a = va; b = vb;
    #1;
    checks++;
    if ({y, wr, j, c, r} !== {ey, ewr, ej, ec, er}) begin
      failures++;
      $display("FAIL op=%h a=%h b=%h: y=%h wr=%b j=%b c=%b r=%b, expected y=%h wr=%b j=%b c=%b r=%b",
               op, va, vb, y, wr, j, c, r, ey, ewr, ej, ec, er);
    end
  endtask

  logic [6:0] ops [19] = '{7'h00, 7'h11, 7'h12, 7'h13, 7'h31, 7'h32, 7'h33, 7'h34,
                           7'h35, 7'h21, 7'h22, 7'h23, 7'h24, 7'h25, 7'h26, 7'h27,
                           7'h28, 7'h29, 7'h7f};
  word_t corner [6] = '{32'd0, 32'd1, 32'd5, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff};

  initial begin
    foreach (ops[k]) begin
      foreach (corner[x]) foreach (corner[z]) check(ops[k], corner[x], corner[z]);
      repeat (200) check(ops[k], $urandom, $urandom);
      repeat (50) begin
        word_t v;
        v = $urandom;
        check(ops[k], v, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
