// Self-checking testbench for game_processor with its instruction and data
// BRAMs. Several random programs using every instruction (forward branches
// and jumps, JAL/JALR pairs, loads and stores, all sprite instructions,
// WAIT, and a few illegal words) are run on the processor and on an
// instruction-set model written here. After every retired instruction the
// pc, all 32 registers and all 64x8 sprite attributes are compared, and the
// cycles since the previous instruction must be 5, 6 for a load, or 5 + n
// for WAIT n. Meanwhile new_frame pulses and a randomly stalling consumer
// make the sprite renderer run alongside; it must never change the timing.
module tb_game_processor;
  import royale_pkg::*;
  localparam int PLEN = 200;
  logic clk = 0, rst = 1;
  logic [9:0] imem_addr, dmem_addr, pw_addr;
  instr_t imem_rdata, pw_data;
  logic pw_we = 0, dmem_we;
  word_t dmem_wdata, dmem_rdata, pc;
  logic retire;
  sval_t mx [2], my [2];
  logic mc [2];
  logic new_frame = 0, sv, sready = 0;
  sval_t sx, sy, sfr;
  sval_t hp [4];
  int checks = 0, failures = 0;
  int n_taken = 0, n_nottaken = 0, n_load = 0, n_wait = 0, n_sprites = 0, n_illegal = 0, n_stall = 0;

  instr_mem u_imem (.clk, .raddr(imem_addr), .rdata(imem_rdata), .we(pw_we), .waddr(pw_addr), .wdata(pw_data));
  data_mem  u_dmem (.clk, .addr(dmem_addr), .we(dmem_we), .wdata(dmem_wdata), .rdata(dmem_rdata));
  game_processor dut (
    .clk, .rst, .imem_addr, .imem_rdata, .dmem_addr, .dmem_we, .dmem_wdata, .dmem_rdata,
    .mouse_x(mx), .mouse_y(my), .mouse_click(mc), .new_frame, .sprite_valid(sv), .sprite_ready(sready),
    .sprite_x(sx), .sprite_y(sy), .sprite_frame(sfr), .tower_hp(hp), .pc, .retire
  );
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s pc=%0h", what, pc);
    end
  endtask

  // ---------------- instruction-set model ----------------
  instr_t prog [PLEN];
  word_t  m_pc;
  word_t  m_r [32];
  sval_t  m_s [64][8];
  word_t  m_mem [1024];
  int     m_cycles;     // cycles the model expects for the last instruction

  function automatic word_t sx14(logic [13:0] v); return word_t'($signed(v)); endfunction
  function automatic word_t ad(word_t a, word_t b); return a >= b ? a - b : b - a; endfunction

  task automatic model_step();
    instr_t in;
    logic [5:0] a, b, c, opr;
    logic [13:0] imm;
    aidx_t ind;
    bit sp, spop;
    word_t nxt;
    in = prog[m_pc[31:2] % PLEN];
    ind = in[35:33]; sp = in[32]; opr = in[31:26]; a = in[25:20]; b = in[19:14]; c = in[13:8]; imm = in[13:0];
    nxt = m_pc + 4;
    m_cycles = 5;
    spop = (opr >= 6'd20 && opr <= 6'd32);
    if (opr > 6'd33 || sp != spop) begin
      n_illegal++;
    end else begin
      case (opr)
        6'd1:  m_r[a[4:0]] = word_t'($signed({b, imm}));
        6'd2:  nxt = {imm, 2'b00};
        6'd3:  begin m_r[a[4:0]] = m_pc + 4; nxt = {imm, 2'b00}; end
        6'd4:  begin nxt = (m_r[b[4:0]] + sx14(imm)) & ~32'd3; m_r[a[4:0]] = m_pc + 4; end
        6'd5, 6'd6, 6'd7, 6'd8: begin
          bit t;
          word_t x, y;
          x = m_r[a[4:0]]; y = m_r[b[4:0]];
          t = (opr == 5) ? x == y : (opr == 6) ? x != y : (opr == 7) ? $signed(x) < $signed(y) : $signed(x) >= $signed(y);
          if (t) begin nxt = {imm, 2'b00}; n_taken++; end else n_nottaken++;
        end
        6'd9:  begin m_r[a[4:0]] = m_mem[(m_r[b[4:0]] + sx14(imm)) % 1024]; m_cycles = 6; n_load++; end
        6'd10: m_mem[(m_r[b[4:0]] + sx14(imm)) % 1024] = m_r[a[4:0]];
        6'd11: m_r[a[4:0]] = m_r[b[4:0]] + sx14(imm);
        6'd12: m_r[a[4:0]] = m_r[b[4:0]] - sx14(imm);
        6'd13: m_r[a[4:0]] = m_r[b[4:0]] << imm[4:0];
        6'd14: m_r[a[4:0]] = m_r[b[4:0]] >> imm[4:0];
        6'd15: m_r[a[4:0]] = m_r[b[4:0]] + m_r[c[4:0]];
        6'd16: m_r[a[4:0]] = m_r[b[4:0]] - m_r[c[4:0]];
        6'd17: m_r[a[4:0]] = m_r[b[4:0]] << m_r[c[4:0]][4:0];
        6'd18: m_r[a[4:0]] = m_r[b[4:0]] >> m_r[c[4:0]][4:0];
        6'd19: m_r[a[4:0]] = ad(m_r[b[4:0]], m_r[c[4:0]]);
        6'd20: m_s[a][ind] = sval_t'(imm);
        6'd21: m_r[b[4:0]] = word_t'(m_s[a][ind]);
        6'd22: m_s[a][ind] = sval_t'(m_r[b[4:0]]);
        6'd23: m_s[a][ind] = sval_t'(m_r[b[4:0]] + sx14(imm));
        6'd24: m_s[a][ind] = sval_t'(m_r[b[4:0]] - sx14(imm));
        6'd25: m_s[a][ind] = m_s[a][ind] + sval_t'(m_r[b[4:0]]);
        6'd26: m_s[a][ind] = m_s[a][ind] - sval_t'(m_r[b[4:0]]);
        6'd27: m_r[b[4:0]] = m_r[b[4:0]] + word_t'(m_s[a][ind]);
        6'd28: m_r[b[4:0]] = m_r[b[4:0]] - word_t'(m_s[a][ind]);
        6'd29: begin m_s[a][ind] = sval_t'(m_mem[(m_r[b[4:0]] + sx14(imm)) % 1024]); m_cycles = 6; n_load++; end
        6'd30: m_mem[(m_r[b[4:0]] + sx14(imm)) % 1024] = word_t'(m_s[a][ind]);
        6'd31: m_s[a][ind] = m_s[a][ind] - m_s[b][imm[2:0]];
        6'd32: m_r[a[4:0]] = ad(word_t'(m_s[b][1]), word_t'(m_s[c][1])) + ad(word_t'(m_s[b][2]), word_t'(m_s[c][2]));
        6'd33: begin m_cycles = 5 + int'({b, imm}); n_wait++; end
        default: ;
      endcase
    end
    m_r[0] = 0;
    for (int m = 0; m < 2; m++) begin
      m_s[62 + m][1] = mx[m]; m_s[62 + m][2] = my[m]; m_s[62 + m][6] = sval_t'(mc[m]);
    end
    m_pc = nxt;
  endtask

  // ---------------- random programs ----------------
  function automatic instr_t rnd_instr(int i);
    int o;
    logic [5:0] a, b;
    logic [13:0] imm;
    aidx_t ind;
    o = $urandom_range(1, 33);
    a = 6'($urandom); b = 6'($urandom); imm = 14'($urandom); ind = aidx_t'($urandom);
    if (o >= 2 && o <= 8) imm = 14'(i + $urandom_range(1, 4));         // forward target
    if (o == 4) return mk_instr(OP_NOP, 0, 0, 0, 0, 0);                  // JALR made in pairs below
    if (o == 33) begin b = 0; imm = 14'($urandom_range(0, 6)); end
    if ($urandom % 25 == 0) return mk_instr(opcode_e'(o), a, b, imm, ind, !(o >= 20 && o <= 32));
    return mk_instr(opcode_e'(o), a, b, imm, ind, (o >= 20 && o <= 32));
  endfunction

  task automatic make_program();
    int i;
    i = 0;
    while (i < PLEN - 1) begin
      if ($urandom % 12 == 0 && i < PLEN - 4) begin
        // LI r, target*4 ; JALR rd, 0(r)
        logic [5:0] r;
        r = 6'($urandom_range(1, 31));
        prog[i]     = mk_instr(OP_LI, r, 6'(0), 14'((i + 2 + $urandom_range(0, 2)) * 4), 0, 0);
        prog[i + 1] = mk_instr(OP_JALR, 6'($urandom), r, 14'(0), 0, 0);
        i += 2;
      end else begin
        prog[i] = rnd_instr(i);
        i++;
      end
    end
    for (int k = 0; k < PLEN - 1; k++)           // no target past the end
      if (prog[k][31:26] inside {[6'd2:6'd8]} && prog[k][31:26] != 6'd4 && int'(prog[k][13:0]) >= PLEN - 1)
        prog[k][13:0] = 14'(PLEN - 1);
    prog[PLEN - 1] = mk_instr(OP_JMP, 0, 0, 14'(PLEN - 1), 0, 0);   // park
  endtask

  // ---------------- renderer environment ----------------
  always @(negedge clk) begin
    sready <= ($urandom % 4 != 0);
    new_frame <= ($urandom % 1500 == 0);
  end
  always @(posedge clk) if (!rst) begin
    if (sv && sready) n_sprites++;
    if (sv && !sready) n_stall++;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 6; run++) begin
      int last, steps;
      rst = 1;
      make_program();
      mx[0] = sval_t'($urandom); my[0] = sval_t'($urandom); mc[0] = 1'($urandom);
      mx[1] = sval_t'($urandom); my[1] = sval_t'($urandom); mc[1] = 1'($urandom);
      for (int k = 0; k < PLEN; k++) begin
        @(negedge clk); pw_we = 1; pw_addr = 10'(k); pw_data = prog[k];
      end
      @(negedge clk); pw_we = 0;
      for (int k = 0; k < 1024; k++) begin u_dmem.mem[k] = word_t'(k * 3 + run); m_mem[k] = word_t'(k * 3 + run); end
      m_pc = 0;
      for (int k = 0; k < 32; k++) m_r[k] = 0;
      for (int s = 0; s < 64; s++) for (int k = 0; k < 8; k++) m_s[s][k] = 0;
      @(negedge clk); rst = 0;
      last = -1; steps = 0;
      while (m_pc != (PLEN - 1) * 4 && steps < 2000) begin
        int t;
        @(posedge clk iff retire);
        t = $time / 10;
        model_step();
        steps++;
        #1;
        if (last >= 0) check(t - last == m_cycles, "cycles per instruction");
        last = t;
        check(pc == m_pc, "pc");
        for (int k = 0; k < 32; k++) check(dut.u_rf.regs[k] == m_r[k], "register");
        for (int s = 0; s < 64; s++) for (int k = 0; k < 8; k++) check(dut.u_sf.spr[s][k] == m_s[s][k], "sprite attribute");
      end
      for (int k = 0; k < 1024; k++) check(u_dmem.mem[k] == m_mem[k], "data memory");
      check(hp[0] == m_s[0][4] && hp[1] == m_s[1][4] && hp[2] == m_s[60][4] && hp[3] == m_s[61][4], "tower hp");
    end
    $display("taken=%0d not_taken=%0d loads=%0d waits=%0d illegal=%0d sprites=%0d stall=%0d",
             n_taken, n_nottaken, n_load, n_wait, n_illegal, n_sprites, n_stall);
    check(n_taken > 0 && n_nottaken > 0 && n_load > 0 && n_wait > 0 && n_illegal > 0 && n_sprites > 0 && n_stall > 0,
          "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
