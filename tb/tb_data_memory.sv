// tb_data_memory: test of the register file and data address map.
//
// The CALU register port is served by a small register array in the
// testbench. 20000 random accesses (direct addresses in both banks,
// indirect through FSR, writes with and without flag updates) are checked
// against a model of the address map kept here: general purpose RAM
// mirrored in both banks, STATUS with read-only TO/PD and flag priority,
// FSR, 5-bit PCLATH, PCL reads and write strobes, CALU register decode,
// and zero for unimplemented addresses.
module tb_data_memory;
  logic clk = 0, rst = 1;
  logic [6:0] f;
  logic [7:0] adr, rd, wdat, pcl = 8'h5A, pclath, status;
  logic we = 0, uc = 0, udc = 0, uz = 0, c = 0, dc = 0, z = 0, pcl_we, calu_we;
  logic [2:0] calu_sel;
  logic [7:0] calu_regs [8];   // stand-in for the CALU: sel 4 and 5 read-only
  int checks = 0, failures = 0;

  // model
  logic [7:0] m_gpr [68], m_status, m_fsr, m_pclath, m_calu [8];

  always #5 clk = ~clk;

  data_memory dut (.clk_i(clk), .rst_i(rst), .f_i(f), .adr_o(adr), .rd_dat_o(rd),
    .wr_en_i(we), .wr_dat_i(wdat), .upd_c_i(uc), .upd_dc_i(udc), .upd_z_i(uz),
    .c_i(c), .dc_i(dc), .z_i(z), .pcl_i(pcl), .pcl_we_o(pcl_we),
    .pclath_o(pclath), .status_o(status), .calu_sel_o(calu_sel),
    .calu_we_o(calu_we), .calu_rd_dat_i(calu_regs[calu_sel]));

  always_ff @(posedge clk) if (calu_we && calu_sel < 4) calu_regs[calu_sel] <= wdat;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] m_eff(logic [6:0] ff);
    return (ff == 0) ? m_fsr : {m_status[5], ff};
  endfunction

  function automatic logic [7:0] m_rd(logic [7:0] a8);
    logic [6:0] a = a8[6:0];
    if (a >= 7'h0C && a <= 7'h4F) return m_gpr[a - 7'h0C];
    if (a >= 7'h50 && a <= 7'h55) return m_calu[a - 7'h50];
    case (a)
      7'h02: return pcl;
      7'h03: return m_status;
      7'h04: return m_fsr;
      7'h0A: return m_pclath;
      default: return 0;
    endcase
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] a8; logic [6:0] a; int r;
    foreach (calu_regs[i]) begin calu_regs[i] = 0; m_calu[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    m_status = 8'h18; m_fsr = 0; m_pclath = 0;
    chk("status reset", status, 8'h18);
    // clear the RAM through direct writes
    for (int i = 0; i < 68; i++) begin
      f = 7'(7'h0C + i); wdat = 0; we = 1;
      @(negedge clk);
      m_gpr[i] = 0;
    end
    we = 0;
    for (int i = 0; i < 20000; i++) begin
      r = $urandom % 100;
      f = (r < 50) ? 7'(7'h0C + $urandom % 68) : (r < 65) ? 7'(7'h50 + $urandom % 6) :
          (r < 75) ? 7'h00 : 7'($urandom % 128);
      we = 1'($urandom); wdat = 8'($urandom);
      uc = 1'($urandom); udc = 1'($urandom); uz = 1'($urandom);
      c = 1'($urandom); dc = 1'($urandom); z = 1'($urandom);
      pcl = 8'($urandom);
      #1;
      a8 = m_eff(f); a = a8[6:0];
      chk("adr", adr, a8);
      chk("read", rd, m_rd(a8));
      chk("pcl_we", pcl_we, we && a == 7'h02);
      @(negedge clk);
      if (we) begin
        if (a >= 7'h0C && a <= 7'h4F) m_gpr[a - 7'h0C] = wdat;
        if (a >= 7'h50 && a <= 7'h53) m_calu[a - 7'h50] = wdat;
        if (a == 7'h03) m_status = {wdat[7:5], m_status[4:3], wdat[2:0]};
        if (a == 7'h04) m_fsr = wdat;
        if (a == 7'h0A) m_pclath = {3'b000, wdat[4:0]};
      end
      if (uc)  m_status[0] = c;
      if (udc) m_status[1] = dc;
      if (uz)  m_status[2] = z;
      chk("status", status, m_status);
      chk("pclath", pclath, m_pclath);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
