// tb_alu: randomized self-check of the alu against a reference written
// independently in this testbench (bit-level formulas for every operation
// and for the C, DC and Z flags).
module tb_alu;
  import utemrisc01_pkg::*;
  alu_op_e op;
  byte_t a, b, y;
  logic c_in, c_out, dc_out, z_out;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .c_in(c_in), .y(y), .c_out(c_out), .dc_out(dc_out), .z_out(z_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model(input alu_op_e o, input byte_t ai, input byte_t bi, input logic ci,
                       output byte_t ye, output logic ce, output logic dce, output logic check_dc);
    int s;
    ce = ci; dce = 1'b0; check_dc = 1'b0;
    case (o)
      ALU_PASS_A: ye = ai;
      ALU_CLR:    ye = 0;
      ALU_ADD: begin s = int'(ai) + int'(bi); ye = 8'(s); ce = (s > 255);
                     dce = (int'(ai[3:0]) + int'(bi[3:0])) > 15; check_dc = 1; end
      ALU_SUB: begin s = int'(ai) - int'(bi); ye = 8'(s); ce = (ai >= bi);
                     dce = (ai[3:0] >= bi[3:0]); check_dc = 1; end
      ALU_AND:  ye = ai & bi;
      ALU_IOR:  ye = ai | bi;
      ALU_XOR:  ye = ai ^ bi;
      ALU_COM:  ye = 8'(255 - int'(ai));
      ALU_INC:  ye = 8'(int'(ai) + 1);
      ALU_DEC:  ye = 8'(int'(ai) + 255);
      ALU_RLF: begin ye = 8'((int'(ai) * 2) + int'(ci)); ce = ai[7]; end
      ALU_RRF: begin ye = 8'((int'(ai) / 2) + (ci ? 128 : 0)); ce = ai[0]; end
      ALU_SWAP: ye = 8'((int'(ai) % 16) * 16 + int'(ai) / 16);
      ALU_BCF: begin ye = ai; ye[bi[2:0]] = 1'b0; end
      ALU_BSF: begin ye = ai; ye[bi[2:0]] = 1'b1; end
      ALU_BSL:  ye = 8'(int'(ai) * (1 << bi[2:0]));
      ALU_BSR:  ye = 8'(int'(ai) / (1 << bi[2:0]));
      ALU_MUL:  ye = 8'(int'(ai) * int'(bi));
      default:  ye = ai;
    endcase
  endtask

  initial begin
    byte_t ye; logic ce, dce, cdc;
    for (int i = 0; i < 20000; i++) begin
      op   = alu_op_e'($urandom_range(0, 17));
      a    = 8'($urandom); b = 8'($urandom); c_in = 1'($urandom);
      if (i < 256) begin op = ALU_BSR; a = 8'hB7; b = 8'(i % 8); end
      #1;
      model(op, a, b, c_in, ye, ce, dce, cdc);
      checks++;
      if (y !== ye || c_out !== ce || z_out !== (ye == 0) || (cdc && dc_out !== dce)) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%s a=%02h b=%02h c=%0d: y=%02h/%02h c=%0d/%0d dc=%0d/%0d z=%0d",
                   op.name(), a, b, c_in, y, ye, c_out, ce, dc_out, dce, z_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
