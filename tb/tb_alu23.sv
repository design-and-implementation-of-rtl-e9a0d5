// Self-checking testbench for alu23: every operation with random operands, shift
// amounts, shifter selections and carries, compared with a reference written here
// with plain integer arithmetic on 64-bit values.
module tb_alu23;
  import fpslns_pkg::*;
  alu_op_e     op;
  alu_shsel_e  shsel;
  logic [4:0]  shamt;
  logic [22:0] a, b, y;
  logic        cin, cout, zero;
  int checks = 0, failures = 0;

  alu23 dut (.op, .shsel, .shamt, .a, .b, .cin, .y, .cout, .zero);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, z, r;
    longint m;
    m = 64'h7FFFFF;
    for (int i = 0; i < 20000; i++) begin
      op    = alu_op_e'($urandom % 12);
      shsel = alu_shsel_e'($urandom % 3);
      shamt = 5'($urandom);
      a     = 23'($urandom);
      b     = 23'($urandom);
      if (i % 7 == 0) b = a;
      cin   = 1'($urandom);
      #1;
      x = (shsel == SH_A) ? (longint'(a) >> shamt) : longint'(a);
      z = (shsel == SH_B) ? (longint'(b) >> shamt) : longint'(b);
      case (op)
        ALU_ADD:   r = x + z;
        ALU_ADC:   r = x + z + longint'(cin);
        ALU_SUB:   r = x - z;
        ALU_SBB:   r = x - z - longint'(cin);
        ALU_RSUB:  r = z - x;
        ALU_AND:   r = x & z;
        ALU_OR:    r = x | z;
        ALU_XOR:   r = x ^ z;
        ALU_PASSA: r = x;
        ALU_PASSB: r = z;
        ALU_SHR:   r = ((longint'(cin) << 23) + longint'(a)) >> shamt;
        default:   r = (longint'(a) << shamt) > m ? ((longint'(a) << shamt) & m) | (1 << 23)
                                                  : (longint'(a) << shamt);
      endcase
      checks++;
      if (y !== 23'(r & m) || zero !== ((r & m) == 0) ||
          (op inside {ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBB, ALU_RSUB, ALU_SHL} &&
           cout !== ((r >> 23) != 0))) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%s sh=%0d/%0d a=%h b=%h cin=%b y=%h cout=%b exp=%h",
                   op.name(), shsel, shamt, a, b, cin, y, cout, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
