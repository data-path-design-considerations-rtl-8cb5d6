// tb_spur_cpu: end-to-end test of the CPU data paths with every parameter
// at its default.
// A 5 ns master clock drives the four-phase generator, so each pipeline cycle
// is 140 ns; the testbench acts as control unit and instruction-unit
// controller. Before each advancing edge (cycle_end high) it checks the
// instruction in Exec (busD, branch decision) and the fetch address, then
// presents the next decoded instruction and the upper-data-path commands.
// An in-order reference model executes every instruction at issue, and a
// reference PC follows branches, jumps and traps. The instruction buffer is
// checked at every fetch: a miss stalls the pipeline for one cycle while the
// word is filled, after which it must hit with the right word. Calls and
// returns step the window pointer (two bubbles are issued before each, so no
// forwarding crosses a window change). Every mechanism - DST1 and DST2
// forwarding, both at once, loads, stores, stalls, taken and untaken branches,
// jumps, traps, calls, returns, overlap-register reads, PSW access, IB hits,
// misses and refills - must occur at least once.
module tb_spur_cpu;
  import spur_pkg::*;
  import tb_ref_pkg::*;

  localparam int NINSTR = 1500;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, stall = 0;
  logic phi1, phi2, phi3, phi4, cycle_end;
  ctrl_t ctrl_i;
  logic [29:0] ifet_pc, exec_pc, mem_pc, swp, call_pc, trap_pc, branch_target;
  logic pc_jump = 0, pc_trap = 0, pc_call = 0, pc_ret = 0;
  logic pc_callpc_we = 0, pc_trappc_we = 0, pc_swp_we = 0, pc_cwp_we = 0;
  cwp_t cwp;
  logic branch_taken, ib_inv = 0, ib_fill_en = 0, ib_hit, mem_rd, mem_wr, rf_write;
  logic [29:0] ib_fill_addr = 0;
  logic [31:0] ib_fill_data = 0, ib_instr;
  data_t mem_addr;
  word_t mem_wdata, mem_rdata, bus_d, upsw, kpsw;
  logic [3:0] fwd;

  spur_cpu dut (.*, .reset_pc(30'h400));
  always #2.5 clk = ~clk;

  // ---------------- memory seen by the design
  word_t tbmem  [data_t];
  word_t issmem [data_t];
  function automatic word_t mem_init(data_t a);
    return {a[7:0] ^ 8'h3c, a ^ 32'hdead_beef};
  endfunction
  function automatic logic [31:0] code(logic [29:0] pc);
    return {pc[15:0], 16'hc0de} ^ {16'h0, pc[15:0]};
  endfunction
  assign mem_rdata = tbmem.exists(mem_addr) ? tbmem[mem_addr] : mem_init(mem_addr);

  typedef struct { data_t addr; word_t data; } st_t;
  st_t st_q[$];
  logic advancing;
  assign advancing = cycle_end && !stall;

  always @(posedge clk) if (rst_n && mem_wr && advancing) begin
    st_t e;
    checks++;
    if (st_q.size() == 0) begin failures++; $display("FAIL unexpected store"); end
    else begin
      e = st_q.pop_front();
      if (e.addr !== mem_addr || e.data !== mem_wdata) begin
        failures++; $display("FAIL store %h=%h exp %h=%h", mem_addr, mem_wdata, e.addr, e.data);
      end
    end
    tbmem[mem_addr] = mem_wdata;
  end

  word_t R [NREGS];
  word_t PSW [2];
  int cnt_f1a = 0, cnt_f1b = 0, cnt_f2a = 0, cnt_f2b = 0, cnt_both = 0;
  int cnt_load = 0, cnt_store = 0, cnt_stall = 0, cnt_bt = 0, cnt_bn = 0, cnt_psw = 0, cnt_ovl = 0;
  int cnt_call = 0, cnt_ret = 0, cnt_jump = 0, cnt_trap = 0, cnt_hit = 0, cnt_miss = 0, cnt_cycles = 0;

  initial begin
    #20000000;
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

  // wait for the negedge before an advancing edge
  task automatic wait_cycle();
    do @(negedge clk); while (!cycle_end);
    cnt_cycles++;
  endtask

  initial begin
    ctrl_t c, prev;
    word_t exp_d;
    logic  exp_t, pend, pend_br, ib_pending;
    logic [29:0] pc_ref, exp_ifet_next, callpc_ref, trappc_ref;
    int quiet, win_step, cmd;
    logic have_prev;    // win_step: +1 return, -1 call, after bubbles
    cwp_t cwp_ref;
    ctrl_i = bubble(); prev = bubble();
    #20 rst_n = 1;
    for (int i = 0; i < NREGS; i++) R[i] = dut.u_ldp.u_rf.mem[i];
    PSW[0] = '0; PSW[1] = '0;
    have_prev = 0; pend = 0; pend_br = 0; quiet = 0; win_step = 0; cwp_ref = '0; pc_ref = 30'h400; callpc_ref = '0; trappc_ref = '0; ib_pending = 0;
    for (int n = 0; n < NINSTR; n++) begin
      wait_cycle();
      {pc_jump, pc_trap, pc_call, pc_ret, pc_callpc_we, pc_trappc_we, pc_swp_we, pc_cwp_we} = '0;
      ib_fill_en = 0;
      // ---- check the state of this cycle
      checks++;
      if (ifet_pc !== pc_ref || cwp !== cwp_ref || call_pc !== callpc_ref || trap_pc !== trappc_ref) begin
        failures++; $display("FAIL n=%0d ifet_pc %h exp %h cwp %0d exp %0d", n, ifet_pc, pc_ref, cwp, cwp_ref);
      end
      if (pend) begin
        checks++;
        if (bus_d !== exp_d) begin failures++; $display("FAIL n=%0d busD %h exp %h", n, bus_d, exp_d); end
        if (pend_br) begin
          checks++;
          if (branch_taken !== exp_t) begin failures++; $display("FAIL n=%0d branch", n); end
          if (exp_t) cnt_bt++; else cnt_bn++;
        end
        if (fwd[3]) cnt_f1a++;
        if (fwd[2]) cnt_f1b++;
        if (fwd[1]) cnt_f2a++;
        if (fwd[0]) cnt_f2b++;
        if ((fwd[3] && fwd[1]) || (fwd[2] && fwd[0])) cnt_both++;
      end
      // ---- instruction buffer at the fetch address
      if (ib_hit) begin
        checks++;
        cnt_hit++;
        if (ib_instr !== code(ifet_pc)) begin failures++; $display("FAIL IB data at %h", ifet_pc); end
        ib_pending = 0;
      end else begin
        checks++;
        if (ib_pending) begin failures++; $display("FAIL IB miss after refill at %h", ifet_pc); end
        cnt_miss++;
      end
      // ---- decide this edge
      stall = !ib_hit || ($urandom % 12 == 0);
      if (!ib_hit) begin   // refill the missing word during the stall
        ib_fill_en = 1; ib_fill_addr = ifet_pc; ib_fill_data = code(ifet_pc); ib_pending = 1;
      end
      pend = 0;
      if (stall) begin cnt_stall++; continue; end
      // upper-data-path command for the instruction now in Exec
      exp_ifet_next = pc_ref + 30'd1;
      if (pend_br && exp_t) exp_ifet_next = exec_pc + prev.imm[29:0];
      if (quiet > 0 && win_step != 0) begin
        if (win_step < 0) begin pc_call = 1; cwp_ref = cwp_ref - 3'd1; cnt_call++; end
        else begin pc_ret = 1; cwp_ref = cwp_ref + 3'd1; cnt_ret++; end
        win_step = 0;
      end else if (!(pend_br && exp_t)) begin
        cmd = $urandom % 60;
        if (cmd == 0) begin pc_jump = 1; exp_ifet_next = callpc_ref; cnt_jump++; end
        else if (cmd == 1) begin pc_trap = 1; exp_ifet_next = trappc_ref; cnt_trap++; end
      end
      pc_ref = exp_ifet_next;
      // choose the instruction issued at this edge
      if (quiet > 0) begin
        c = bubble(); quiet--;
      end else if (win_step == 0 && $urandom % 40 == 0) begin
        win_step = ($urandom % 2) ? 1 : -1;
        c = bubble(); quiet = 1;
      end else begin
        int kind;
        kind = $urandom % 20;
        c = rand_ctrl(1);
        if (kind < 3) begin
          c.is_load = 1; c.fu = FU_ALU; c.alu_op = ALU_ADD; c.use_imm = 1; c.imm = word_t'($urandom % 64);
        end else if (kind < 6) begin
          c.is_store = 1; c.rd_we = 0; c.fu = FU_ALU; c.alu_op = ALU_ADD; c.use_imm = 1; c.imm = word_t'($urandom % 64);
        end else if (kind < 8) begin
          c.is_branch = 1; c.rd_we = 0; c.fu = FU_ALU; c.alu_op = ALU_SUB; c.cond = cond_e'($urandom % 12);
          c.imm[29:0] = 30'($urandom % 32) - 30'd8;
          if ($urandom % 2) c.rs2 = c.rs1;
        end else if (kind == 8) begin
          c.psw_we = 1; c.rd_we = 0; c.psw_sel = $urandom % 2; c.fu = FU_ALU;
        end else if (kind == 9) begin
          c.fu = FU_PSW; c.psw_sel = $urandom % 2;
        end
        if (prev.is_load && prev.rd_we) begin
          if (c.rs1 == prev.rd) c.rs1 = prev.rd ^ 5'd1;
          if (c.rs2 == prev.rd) c.rs2 = prev.rd ^ 5'd1;
        end
      end
      // the instruction in Exec may also load CallPC / TrapPC from busS
      if (!pc_call && !pc_ret && have_prev && pend_prev_alu(prev)) begin
        if ($urandom % 8 == 0) begin pc_callpc_we = 1; callpc_ref = exp_d[29:0]; end
        else if ($urandom % 8 == 0) begin pc_trappc_we = 1; trappc_ref = exp_d[29:0]; end
      end
      begin
        word_t a, b, bb;
        int wrow;
        a  = R[ref_row(int'(c.rs1), int'(cwp_ref))];
        bb = R[ref_row(int'(c.rs2), int'(cwp_ref))];
        b  = c.use_imm ? c.imm : bb;
        if (c.rs1 >= 26 && (cnt_call + cnt_ret) > 0) cnt_ovl++;
        exp_d = ref_exec(c, a, b, PSW[c.psw_sel]);
        exp_t = ref_taken(c.cond, a[31:0], b[31:0]);
        pend_br = c.is_branch;
        wrow = ref_row(int'(c.rd), int'(cwp_ref));
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
      have_prev = 1;
    end
    wait_cycle(); stall = 0; ctrl_i = bubble();
    {pc_jump, pc_trap, pc_call, pc_ret, pc_callpc_we, pc_trappc_we, pc_swp_we, pc_cwp_we} = '0;
    repeat (4) wait_cycle();
    for (int i = 0; i < NREGS; i++) begin
      checks++;
      if (dut.u_ldp.u_rf.mem[i] !== R[i]) begin failures++; $display("FAIL row %0d", i); end
    end
    checks++;
    if (st_q.size() != 0 || upsw !== PSW[0] || kpsw !== PSW[1]) begin failures++; $display("FAIL stores/psw at end"); end
    $display("cycles %0d: dst1->A %0d dst1->B %0d dst2->A %0d dst2->B %0d both %0d load %0d store %0d stall %0d taken %0d untaken %0d jump %0d trap %0d call %0d ret %0d overlap %0d psw %0d ib-hit %0d ib-miss %0d",
             cnt_cycles, cnt_f1a, cnt_f1b, cnt_f2a, cnt_f2b, cnt_both, cnt_load, cnt_store, cnt_stall, cnt_bt, cnt_bn,
             cnt_jump, cnt_trap, cnt_call, cnt_ret, cnt_ovl, cnt_psw, cnt_hit, cnt_miss);
    checks++;
    if (cnt_f1a == 0 || cnt_f1b == 0 || cnt_f2a == 0 || cnt_f2b == 0 || cnt_both == 0 || cnt_load == 0 ||
        cnt_store == 0 || cnt_stall == 0 || cnt_bt == 0 || cnt_bn == 0 || cnt_jump == 0 || cnt_trap == 0 ||
        cnt_call == 0 || cnt_ret == 0 || cnt_ovl == 0 || cnt_psw == 0 || cnt_hit == 0 || cnt_miss == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    // one pipeline cycle is 28 master clocks (140 ns)
    checks++;
    if ($realtime / 140.0 < real'(cnt_cycles) - 2.0 || $realtime / 140.0 > real'(cnt_cycles) + 2.0) begin
      failures++; $display("FAIL cycle time: %0d cycles in %0t", cnt_cycles, $realtime);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic pend_prev_alu(ctrl_t p);
    return p.fu == FU_ALU && !p.is_load && !p.is_store && !p.is_branch && !p.psw_we;
  endfunction
endmodule
