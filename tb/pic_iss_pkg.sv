// pic_iss_pkg: instruction-level reference model of the enhanced core.
//
// Used by the core and top-level testbenches. The model executes one
// instruction per call of step(), written from the instruction set
// definition and not from the RTL: PIC16x84 mid-range instructions with a
// 15-bit word, the CALU word instructions ADD16 and SUB16, and the same
// two-stage fetch behaviour (a taken branch, return, skip or PCL write
// turns the prefetched word into a one-cycle bubble). After each step the
// model's pc, w, status and CALU result must equal the core's at the end of
// the corresponding instruction cycle.
package pic_iss_pkg;

  localparam logic [14:0] ADD16 = 15'b100011100001100;
  localparam logic [14:0] SUB16 = 15'b100010000001100;

  class pic_iss;
    int unsigned depth;
    logic [14:0] pmem [];
    logic [12:0] pc;       // fetch address
    logic [14:0] ir;       // executing word
    logic [7:0]  w, status, fsr, pclath;
    logic [7:0]  gpr [68];
    logic [7:0]  cin1h, cin1l, cin2h, cin2l;
    logic [15:0] cout;
    logic [12:0] stack [8];
    int unsigned sp;
    // last step's data memory write
    bit          wrote;
    logic [7:0]  wr_adr, wr_dat;
    bit          flushed;

    function new(int unsigned d);
      depth = d;
      pmem = new[d];
      foreach (pmem[i]) pmem[i] = '0;
      reset();
    endfunction

    function void reset();
      pc = 0; ir = 0; w = 0; status = 8'h18; fsr = 0; pclath = 0;
      foreach (gpr[i]) gpr[i] = 0;
      cin1h = 0; cin1l = 0; cin2h = 0; cin2l = 0; cout = 0;
      foreach (stack[i]) stack[i] = 0;
      sp = 0;
    endfunction

    function logic [7:0] eff(logic [6:0] f);
      return (f == 0) ? fsr : {status[5], f};
    endfunction

    function logic [7:0] rd(logic [7:0] a8);
      logic [6:0] a = a8[6:0];
      if (a >= 7'h0C && a <= 7'h4F) return gpr[a - 7'h0C];
      case (a)
        7'h02: return pc[7:0];
        7'h03: return status;
        7'h04: return fsr;
        7'h0A: return pclath;
        7'h50: return cin1h;
        7'h51: return cin1l;
        7'h52: return cin2h;
        7'h53: return cin2l;
        7'h54: return cout[15:8];
        7'h55: return cout[7:0];
        default: return 8'h00;
      endcase
    endfunction

    // returns 1 when the write was to PCL
    function bit wr(logic [7:0] a8, logic [7:0] v);
      logic [6:0] a = a8[6:0];
      wrote = 1; wr_adr = a8; wr_dat = v;
      if (a >= 7'h0C && a <= 7'h4F) gpr[a - 7'h0C] = v;
      case (a)
        7'h03: status = {v[7:5], status[4:3], v[2:0]};
        7'h04: fsr = v;
        7'h0A: pclath = {3'b000, v[4:0]};
        7'h50: cin1h = v;
        7'h51: cin1l = v;
        7'h52: cin2h = v;
        7'h53: cin2l = v;
        default: ;
      endcase
      return (a == 7'h02);
    endfunction

    function void add8(logic [7:0] a, logic [7:0] b, bit sub,
                       output logic [7:0] y, output bit c, output bit dc);
      int bb, s, n;
      bb = sub ? ((~b) & 8'hFF) : b;
      s  = a + bb + (sub ? 1 : 0);
      n  = (a & 15) + (bb & 15) + (sub ? 1 : 0);
      y  = s[7:0];
      c  = s > 255;
      dc = n > 15;
    endfunction

    function void step();
      logic [13:0] i;
      logic [6:0]  f;
      logic [7:0]  a8, v, k, y;
      bit d, c, dc, jump, skip, to_f, to_w;
      bit set_c, set_dc, set_z;
      bit pclw;
      logic [12:0] npc;
      int unsigned b;

      i = ir[13:0];
      f = i[6:0];
      d = i[7];
      k = i[7:0];
      a8 = eff(f);
      v = rd(a8);
      wrote = 0;
      jump = 0; skip = 0; to_f = 0; to_w = 0; pclw = 0;
      set_c = 0; set_dc = 0; set_z = 0;
      c = status[0]; dc = 0; y = 0;
      npc = pc + 1;

      if (ir[14]) begin
        if (ir == ADD16 || ir == SUB16) begin
          logic [15:0] x1, x2, bb, r;
          int s;
          x1 = {cin1h, cin1l};
          x2 = {cin2h, cin2l};
          bb = (ir == SUB16) ? ~x2 : x2;
          s  = x1 + bb + ((ir == SUB16) ? 1 : 0);
          r  = s[15:0];
          cout = r;
          status[0] = s > 65535;
          status[1] = ((x1 & 16'hF) + (bb & 16'hF) + ((ir == SUB16) ? 1 : 0)) > 15;
          status[2] = (r == 0);
        end
      end else begin
        case (i[13:12])
          2'b00: begin
            to_w = !d; to_f = d;
            case (i[11:8])
              4'h0: begin
                to_w = 0; to_f = 0;
                if (d) begin y = w; to_f = 1; end
                else if (i == 14'h0008 || i == 14'h0009) begin
                  sp = (sp + 7) % 8; npc = stack[sp]; jump = 1;
                end
              end
              4'h1: begin y = 0; set_z = 1; end
              4'h2: begin add8(v, w, 1, y, c, dc); set_c = 1; set_dc = 1; set_z = 1; end
              4'h3: begin y = v - 1; set_z = 1; end
              4'h4: begin y = v | w; set_z = 1; end
              4'h5: begin y = v & w; set_z = 1; end
              4'h6: begin y = v ^ w; set_z = 1; end
              4'h7: begin add8(v, w, 0, y, c, dc); set_c = 1; set_dc = 1; set_z = 1; end
              4'h8: begin y = v; set_z = 1; end
              4'h9: begin y = ~v; set_z = 1; end
              4'hA: begin y = v + 1; set_z = 1; end
              4'hB: begin y = v - 1; skip = (y == 0); end
              4'hC: begin y = {status[0], v[7:1]}; c = v[0]; set_c = 1; end
              4'hD: begin y = {v[6:0], status[0]}; c = v[7]; set_c = 1; end
              4'hE: begin y = {v[3:0], v[7:4]}; end
              4'hF: begin y = v + 1; skip = (y == 0); end
            endcase
          end
          2'b01: begin
            b = i[9:7];
            case (i[11:10])
              2'b00: begin y = v; y[b] = 0; to_f = 1; end
              2'b01: begin y = v; y[b] = 1; to_f = 1; end
              2'b10: skip = (v[b] == 0);
              2'b11: skip = (v[b] == 1);
            endcase
          end
          2'b10: begin
            if (!i[11]) begin stack[sp] = pc; sp = (sp + 1) % 8; end
            npc = {pclath[4:3], i[10:0]};
            jump = 1;
          end
          2'b11: begin
            to_w = 1;
            casez (i[11:8])
              4'b00??: y = k;
              4'b01??: begin y = k; sp = (sp + 7) % 8; npc = stack[sp]; jump = 1; end
              4'b1000: begin y = k | w; set_z = 1; end
              4'b1001: begin y = k & w; set_z = 1; end
              4'b1010: begin y = k ^ w; set_z = 1; end
              4'b110?: begin add8(k, w, 1, y, c, dc); set_c = 1; set_dc = 1; set_z = 1; end
              4'b111?: begin add8(k, w, 0, y, c, dc); set_c = 1; set_dc = 1; set_z = 1; end
              default: to_w = 0;
            endcase
          end
        endcase
        if (to_f) pclw = wr(a8, y);
        if (to_w) w = y;
        if (set_c)  status[0] = c;
        if (set_dc) status[1] = dc;
        if (set_z)  status[2] = (y == 0);
        if (pclw && !jump) begin npc = {pclath[4:0], y}; jump = 1; end
      end

      flushed = jump || skip;
      ir = flushed ? 15'h0000 : pmem[pc % depth];
      pc = npc;
    endfunction
  endclass

endpackage
