// tb_spur_ldp: runs random instruction streams through the lower data path
// and compares it cycle by cycle with an in-order reference model.
// The reference executes each instruction when it is issued (its Ifetch
// cycle), so any fault in forwarding, write-back or the pipeline registers
// shows as a wrong busD value in the Exec cycle, a wrong store on the memory
// bus, a wrong branch decision or a wrong register-file row at the end.
// The generator favours a few registers so that neighbouring instructions
// depend on each other, keeps an instruction after a load from reading the
// loaded register (that sequence is undefined), issues two bubbles before
// changing the window pointer, and raises hold at random. Each mechanism
// (DST1 and DST2 forwarding on each bus, both at once, load, store, hold,
// taken and untaken branch, window change with an overlap read, PSW access)
// must happen at least once.
module tb_spur_ldp;
  import spur_pkg::*;
  import tb_ref_pkg::*;

  localparam int NINSTR = 4000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0;
  ctrl_t ctrl_i;
  cwp_t  cwp;
  data_t mem_addr, bus_s;
  logic  mem_rd, mem_wr, exec_branch, branch_taken, wb_we;
  word_t mem_wdata, mem_rdata, exec_imm, bus_d, upsw, kpsw;
  logic  f1a, f1b, f2a, f2b;

  spur_ldp dut (.clk, .rst_n, .hold, .ctrl_i, .cwp, .mem_addr, .mem_rd, .mem_wr, .mem_wdata, .mem_rdata,
                .bus_s, .exec_branch, .branch_taken, .exec_imm, .bus_d, .upsw, .kpsw,
                .fwd_dst1_a(f1a), .fwd_dst1_b(f1b), .fwd_dst2_a(f2a), .fwd_dst2_b(f2b), .wb_we);
  always #5 clk = ~clk;

  // ---------------- memory seen by the design
  word_t tbmem  [data_t];
  word_t issmem [data_t];
  function automatic word_t mem_init(data_t a);
    return {a[7:0] ^ 8'h3c, a ^ 32'hdead_beef};
  endfunction
  assign mem_rdata = tbmem.exists(mem_addr) ? tbmem[mem_addr] : mem_init(mem_addr);

  typedef struct { data_t addr; word_t data; } st_t;
  st_t st_q[$];

  always @(posedge clk) if (rst_n && mem_wr && !hold) begin
    checks++;
    if (st_q.size() == 0) begin failures++; $display("FAIL unexpected store"); end
    else begin
      st_t e;
      e = st_q.pop_front();
      if (e.addr !== mem_addr || e.data !== mem_wdata) begin
        failures++; $display("FAIL store %h=%h exp %h=%h", mem_addr, mem_wdata, e.addr, e.data);
      end
    end
    tbmem[mem_addr] = mem_wdata;
  end

  // ---------------- reference state
  word_t R [NREGS];
  word_t PSW [2];
  int cnt_f1a = 0, cnt_f1b = 0, cnt_f2a = 0, cnt_f2b = 0, cnt_both = 0;
  int cnt_load = 0, cnt_store = 0, cnt_hold = 0, cnt_bt = 0, cnt_bn = 0, cnt_win = 0, cnt_psw = 0, cnt_ovl = 0;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t bubble();
    ctrl_t c;
    c = '0;
    c.fu = FU_ALU;
    return c;
  endfunction

  initial begin
    ctrl_t c, prev;
    word_t exp_d;
    logic  exp_t, pend, pend_br;
    int bubbles_left, win_pending;
    cwp = 3'd2;
    ctrl_i = bubble();
    prev = bubble();
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < NREGS; i++) R[i] = dut.u_rf.mem[i];
    PSW[0] = '0; PSW[1] = '0;
    pend = 0; pend_br = 0; bubbles_left = 0; win_pending = 0;
    c = bubble();
    for (int n = 0; n < NINSTR; n++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (bus_d !== exp_d) begin failures++; $display("FAIL n=%0d busD %h exp %h", n, bus_d, exp_d); end
        if (pend_br) begin
          checks++;
          if (branch_taken !== exp_t) begin failures++; $display("FAIL n=%0d branch", n); end
          if (exp_t) cnt_bt++; else cnt_bn++;
        end
        if (f1a) cnt_f1a++;
        if (f1b) cnt_f1b++;
        if (f2a) cnt_f2a++;
        if (f2b) cnt_f2b++;
        if ((f1a && f2a) || (f1b && f2b)) cnt_both++;
      end
      pend = 0;
      hold = ($urandom % 10 == 0);
      if (hold) begin cnt_hold++; continue; end
      // choose the instruction issued at the next edge
      if (bubbles_left > 0) begin
        c = bubble(); bubbles_left--;
        if (bubbles_left == 0) begin cwp = cwp + 3'(win_pending); cnt_win++; end
      end else if ($urandom % 150 == 0) begin
        win_pending = ($urandom % 2) ? 1 : -1;
        c = bubble(); bubbles_left = 1;
      end else begin
        int kind;
        kind = $urandom % 20;
        c = rand_ctrl(1);
        if (kind < 3) begin                    // load
          c.is_load = 1; c.fu = FU_ALU; c.alu_op = ALU_ADD; c.use_imm = 1;
          c.imm = word_t'($urandom % 64);
        end else if (kind < 6) begin           // store
          c.is_store = 1; c.rd_we = 0; c.fu = FU_ALU; c.alu_op = ALU_ADD; c.use_imm = 1;
          c.imm = word_t'($urandom % 64);
        end else if (kind < 8) begin           // compare and branch
          c.is_branch = 1; c.rd_we = 0; c.fu = FU_ALU; c.alu_op = ALU_SUB;
          c.cond = cond_e'($urandom % 12);
          if ($urandom % 2) c.rs2 = c.rs1;
        end else if (kind == 8) begin          // PSW write / read
          c.psw_we = 1; c.rd_we = 0; c.psw_sel = $urandom % 2; c.fu = FU_ALU;
        end else if (kind == 9) begin
          c.fu = FU_PSW; c.psw_sel = $urandom % 2;
        end
        if (prev.is_load && prev.rd_we) begin  // avoid the undefined load-use sequence
          if (c.rs1 == prev.rd) c.rs1 = prev.rd ^ 5'd1;
          if (c.rs2 == prev.rd) c.rs2 = prev.rd ^ 5'd1;
        end
      end
      // reference execution
      begin
        word_t a, b, bb;
        int wrow;
        a  = R[ref_row(int'(c.rs1), int'(cwp))];
        bb = R[ref_row(int'(c.rs2), int'(cwp))];
        b  = c.use_imm ? c.imm : bb;
        if (c.rs1 >= 26 && cnt_win > 0) cnt_ovl++;
        exp_d = ref_exec(c, a, b, PSW[c.psw_sel]);
        exp_t = ref_taken(c.cond, a[31:0], b[31:0]);
        pend_br = c.is_branch;
        wrow = ref_row(int'(c.rd), int'(cwp));
        if (c.is_load) begin
          data_t ad;
          ad = exp_d[31:0];
          R[wrow] = issmem.exists(ad) ? issmem[ad] : mem_init(ad);
          cnt_load++;
        end else if (c.is_store) begin
          st_t e;
          e.addr = exp_d[31:0]; e.data = bb;
          st_q.push_back(e);
          issmem[e.addr] = bb;
          cnt_store++;
        end else if (c.rd_we) begin
          R[wrow] = exp_d;
        end
        if (c.psw_we) begin PSW[c.psw_sel] = exp_d; cnt_psw++; end
        if (c.fu == FU_PSW) cnt_psw++;
      end
      ctrl_i = c;
      prev = c;
      pend = 1;
    end
    // drain
    @(negedge clk); hold = 0; ctrl_i = bubble();
    repeat (4) @(negedge clk);
    for (int i = 0; i < NREGS; i++) begin
      checks++;
      if (dut.u_rf.mem[i] !== R[i]) begin failures++; $display("FAIL row %0d = %h exp %h", i, dut.u_rf.mem[i], R[i]); end
    end
    checks++;
    if (st_q.size() != 0) begin failures++; $display("FAIL %0d stores missing", st_q.size()); end
    checks++;
    if (upsw !== PSW[0] || kpsw !== PSW[1]) begin failures++; $display("FAIL psw"); end
    $display("mechanisms: dst1->A %0d dst1->B %0d dst2->A %0d dst2->B %0d both %0d load %0d store %0d hold %0d taken %0d untaken %0d window %0d overlap-reads %0d psw %0d",
             cnt_f1a, cnt_f1b, cnt_f2a, cnt_f2b, cnt_both, cnt_load, cnt_store, cnt_hold, cnt_bt, cnt_bn, cnt_win, cnt_ovl, cnt_psw);
    if (cnt_f1a == 0 || cnt_f1b == 0 || cnt_f2a == 0 || cnt_f2b == 0 || cnt_both == 0 || cnt_load == 0 ||
        cnt_store == 0 || cnt_hold == 0 || cnt_bt == 0 || cnt_bn == 0 || cnt_win == 0 || cnt_ovl == 0 || cnt_psw == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
