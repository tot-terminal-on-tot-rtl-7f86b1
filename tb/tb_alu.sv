// tb_alu: self-checking test of the ALU against a behavioural reference, over
// directed corner cases and random operands for every operation.
module tb_alu;
  import tot_pkg::*;
  logic [31:0] a, b, y;
  logic        br;
  alu_op_e     op;
  int checks = 0, failures = 0;

  alu dut (.aluIn1(a), .aluIn2(b), .op(op), .aluOut(y), .branch(br));

  function automatic void ref_model(alu_op_e o, logic [31:0] x, logic [31:0] z,
                                    output logic [31:0] r, output logic t);
    r = '0; t = 1'b0;
    case (o)
      ALU_ADD:  r = x + z;
      ALU_SUB:  r = x - z;
      ALU_AND:  r = x & z;
      ALU_OR:   r = x | z;
      ALU_XOR:  r = x ^ z;
      ALU_SRL:  r = x >> z[4:0];
      ALU_SRA:  for (int i = 0; i < 32; i++) r[i] = (i + z[4:0] > 31) ? x[31] : x[i + z[4:0]];
      ALU_SL:   r = x << z[4:0];
      ALU_PASS: r = z;
      ALU_BGE:  t = !(x < z);
      ALU_BLT:  t = x < z;
      ALU_SBGE: t = !((x[31] != z[31]) ? x[31] : (x < z));
      ALU_SBLT: t = (x[31] != z[31]) ? x[31] : (x < z);
      ALU_BEQ:  t = (x == z);
      ALU_JAL:  t = 1'b1;
      ALU_JALR: begin t = 1'b1; r = x + z; end
      default: ;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] r; logic t;
    op = o; a = x; b = z;
    #1;
    ref_model(o, x, z, r, t);
    checks++;
    if (y !== r || br !== t) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h/%b exp %h/%b", o, x, z, y, br, r, t);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1234_5678};
    for (int o = 0; o <= 15; o++)
      foreach (corner[i]) foreach (corner[j]) check(alu_op_e'(o), corner[i], corner[j]);
    for (int n = 0; n < 3000; n++) check(alu_op_e'($urandom_range(0, 15)), $urandom, $urandom);
    // a few hand-worked values
    op = ALU_SRA; a = 32'hF000_0000; b = 32'd4; #1; checks++; if (y !== 32'hFF00_0000) failures++;
    op = ALU_SBLT; a = 32'hFFFF_FFFF; b = 32'd1; #1; checks++; if (br !== 1'b1) failures++;
    op = ALU_BLT;  a = 32'hFFFF_FFFF; b = 32'd1; #1; checks++; if (br !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
