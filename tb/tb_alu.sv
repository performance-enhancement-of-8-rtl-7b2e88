// tb_alu: test of the 8-bit ALU.
// Every operation is applied to 3000 random operand sets (and all bit
// positions for the bit operations); results and flags are compared with
// reference values computed here from the operation's definition.
module tb_alu;
  import pic_pkg::*;

  alu_op_t op;
  logic [7:0] a, b, y;
  logic cin, c, dc, z;
  logic [2:0] bsel;
  int checks = 0, failures = 0;

  alu dut (.op_i(op), .a_i(a), .b_i(b), .cin_i(cin), .bit_i(bsel),
           .y_o(y), .c_o(c), .dc_o(dc), .z_o(z));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ey; logic ec, edc; bit chk_c, chk_dc;
    int s;
    for (int o = 0; o <= int'(ALU_BTST); o++) begin
      for (int n = 0; n < 3000; n++) begin
        op = alu_op_t'(o);
        a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom); bsel = 3'($urandom);
        if (n < 4) begin a = 8'hFF * 8'(n & 1); b = 8'hFF * 8'(n >> 1); end
        #1;
        chk_c = 0; chk_dc = 0; ec = 0; edc = 0;
        case (op)
          ALU_PASSA: ey = a;
          ALU_PASSB: ey = b;
          ALU_ZERO:  ey = 0;
          ALU_ADD: begin s = a + b; ey = s[7:0]; ec = s > 255; edc = (a % 16 + b % 16) > 15; chk_c = 1; chk_dc = 1; end
          ALU_SUB: begin s = a - b; ey = s[7:0]; ec = a >= b; edc = (a % 16) >= (b % 16); chk_c = 1; chk_dc = 1; end
          ALU_AND:  ey = a & b;
          ALU_IOR:  ey = a | b;
          ALU_XOR:  ey = a ^ b;
          ALU_COM:  ey = ~a;
          ALU_INC:  ey = a + 1;
          ALU_DEC:  ey = a - 1;
          ALU_RLF: begin ey = (a << 1) | 8'(cin); ec = a[7]; chk_c = 1; end
          ALU_RRF: begin ey = (a >> 1) | (8'(cin) << 7); ec = a[0]; chk_c = 1; end
          ALU_SWAP: ey = (a << 4) | (a >> 4);
          ALU_BCF:  begin ey = a; ey[bsel] = 0; end
          ALU_BSF:  begin ey = a; ey[bsel] = 1; end
          ALU_BTST: ey = a[bsel] ? (8'h01 << bsel) : 8'h00;
          default:  ey = a;
        endcase
        checks++;
        if (y !== ey || z !== (ey == 0) || (chk_c && c !== ec) || (chk_dc && dc !== edc)) begin
          failures++;
          if (failures < 10)
            $display("%s a=%h b=%h cin=%b bit=%0d: y=%h/%h c=%b/%b dc=%b/%b z=%b",
                     op.name(), a, b, cin, bsel, y, ey, c, ec, dc, edc, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
