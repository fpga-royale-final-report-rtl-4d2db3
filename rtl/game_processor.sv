// game_processor: the custom processor that runs the game program.
//
// A non-pipelined processor: each instruction passes through every stage
// before the next one is fetched, as in the report.
//   FETCH0/FETCH1  instruction handler: present pc to the instruction BRAM,
//                  capture the 36-bit word one cycle later (2 cycles)
//   DECODE         instr_decoder reads the register and sprite files (1)
//   EXEC           alu computes the result and the branch decision (1)
//   MEM            store, write-back to register/sprite file, pc update (1);
//                  a load adds MEM2 for the BRAM read latency (2 in all)
//   WAIT           holds for the count of a WAIT instruction
// So an instruction takes 5 cycles, a load 6, a WAIT n cycles 5 + n.
// The pc is a byte address (pc+4 per instruction, as the report's JALR
// description implies); the instruction BRAM is indexed by pc[.. :2].
// Sprite results are truncated to 13 bits; register results are 32 bits.
// The sprite renderer runs in parallel on its own read port and never stalls
// execution. The instruction and data BRAMs sit outside this module, as in
// the report's overview, and connect through the imem_* and dmem_* ports.
// Reset is synchronous and active high; the pc restarts at 0.
module game_processor
  import royale_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH   = 1024,
  parameter int unsigned DMEM_DEPTH   = 1024,
  parameter int unsigned MAX_ELIXIR   = 10,
  parameter int unsigned ELIXIR_FRAME = 23,
  parameter int unsigned ELIXIR_X0    = 0,
  parameter int unsigned ELIXIR_DX    = 36,
  parameter int unsigned ELIXIR_Y_TOP = 0,
  parameter int unsigned ELIXIR_Y_BOT = 672
) (
  input  logic                          clk,
  input  logic                          rst,
  // instruction BRAM
  output logic [$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  instr_t                        imem_rdata,
  // data BRAM
  output logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr,
  output logic                          dmem_we,
  output word_t                         dmem_wdata,
  input  word_t                         dmem_rdata,
  // mice (wired into sprites 62 and 63)
  input  sval_t                         mouse_x [2],
  input  sval_t                         mouse_y [2],
  input  logic                          mouse_click [2],
  // graphics
  input  logic                          new_frame,
  output logic                          sprite_valid,
  input  logic                          sprite_ready,
  output sval_t                         sprite_x,
  output sval_t                         sprite_y,
  output sval_t                         sprite_frame,
  // 7-segment display
  output sval_t                         tower_hp [4],
  // status
  output word_t                         pc,
  output logic                          retire      // one cycle per finished instruction
);
  typedef enum logic [2:0] {S_FETCH0, S_FETCH1, S_DECODE, S_EXEC, S_MEM, S_MEM2, S_WAIT} state_e;
  state_e   st;
  instr_t   instr_q;
  decoded_t dec, dec_q;
  word_t    alu_res, res_q;
  logic     alu_taken, taken_q;
  word_t    wait_cnt;

  // register file / sprite file wiring
  ridx_t   ra1, ra2, ra3;
  word_t   rv1, rv2, rv3, elixir0, elixir1;
  sidx_t   rsa, rsb, rsr;
  sprite_t spa, spb, spr_r;
  logic    rf_we, sf_we;
  ridx_t   rf_wa;
  word_t   rf_wd;
  sidx_t   sf_ws;
  aidx_t   sf_wi;
  sval_t   sf_wd;

  reg_file u_rf (
    .clk, .rst, .ra1, .ra2, .ra3, .rd1(rv1), .rd2(rv2), .rd3(rv3),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd), .elixir0, .elixir1
  );

  sprite_file u_sf (
    .clk, .rst, .rsa, .rsb, .rda(spa), .rdb(spb), .rsr, .rdr(spr_r),
    .we(sf_we), .ws(sf_ws), .wi(sf_wi), .wd(sf_wd),
    .mouse_x, .mouse_y, .mouse_click, .tower_hp
  );

  instr_decoder u_dec (
    .instr(instr_q), .ra1, .ra2, .ra3, .rv1, .rv2, .rv3,
    .rsa, .rsb, .spa, .spb, .d(dec)
  );

  alu u_alu (
    .op(dec_q.alu_op), .a(dec_q.a), .b(dec_q.b), .br(dec_q.br),
    .cmp_a(dec_q.br_cmp_a), .cmp_b(dec_q.br_cmp_b), .res(alu_res), .taken(alu_taken)
  );

  sprite_renderer #(
    .MAX_ELIXIR(MAX_ELIXIR), .ELIXIR_FRAME(ELIXIR_FRAME), .ELIXIR_X0(ELIXIR_X0),
    .ELIXIR_DX(ELIXIR_DX), .ELIXIR_Y_TOP(ELIXIR_Y_TOP), .ELIXIR_Y_BOT(ELIXIR_Y_BOT)
  ) u_render (
    .clk, .rst, .new_frame, .rd_sprite(rsr), .rd_data(spr_r), .elixir0, .elixir1,
    .sprite_valid, .sprite_ready, .sprite_x, .sprite_y, .sprite_frame, .busy()
  );

  // next pc after the memory stage
  word_t pc_next;
  always_comb begin
    pc_next = pc + 32'd4;
    if (taken_q) pc_next = (dec_q.br == BR_REG) ? {res_q[31:2], 2'b00} : dec_q.br_target;
  end

  assign imem_addr  = pc[$clog2(IMEM_DEPTH)+1:2];
  assign dmem_addr  = res_q[$clog2(DMEM_DEPTH)-1:0];
  assign dmem_we    = (st == S_MEM) && dec_q.mem_wr;
  assign dmem_wdata = dec_q.store_data;

  // write-back
  always_comb begin
    word_t v;
    v     = (st == S_MEM2) ? dmem_rdata : (dec_q.link ? pc + 32'd4 : res_q);
    rf_we = 1'b0;
    sf_we = 1'b0;
    if ((st == S_MEM && !dec_q.mem_rd) || st == S_MEM2) begin
      rf_we = (dec_q.wb == WB_REG);
      sf_we = (dec_q.wb == WB_SPRITE);
    end
    rf_wa = dec_q.rd;
    rf_wd = v;
    sf_ws = dec_q.spd;
    sf_wi = dec_q.ind;
    sf_wd = v[SVAL_W-1:0];
  end

  always_ff @(posedge clk) begin
    retire <= 1'b0;
    if (rst) begin
      st <= S_FETCH0; pc <= '0; instr_q <= '0; dec_q <= '0;
      res_q <= '0; taken_q <= 1'b0; wait_cnt <= '0;
    end else begin
      unique case (st)
        S_FETCH0: st <= S_FETCH1;
        S_FETCH1: begin instr_q <= imem_rdata; st <= S_DECODE; end
        S_DECODE: begin dec_q <= dec; st <= S_EXEC; end
        S_EXEC:   begin res_q <= alu_res; taken_q <= alu_taken; st <= S_MEM; end
        S_MEM: begin
          if (dec_q.mem_rd) st <= S_MEM2;
          else begin
            pc <= pc_next;
            if (dec_q.is_wait && dec_q.b != '0) begin
              wait_cnt <= dec_q.b;
              st       <= S_WAIT;
            end else begin
              retire <= 1'b1;
              st     <= S_FETCH0;
            end
          end
        end
        S_MEM2: begin pc <= pc_next; retire <= 1'b1; st <= S_FETCH0; end
        S_WAIT: begin
          wait_cnt <= wait_cnt - 1'b1;
          if (wait_cnt == 32'd1) begin retire <= 1'b1; st <= S_FETCH0; end
        end
        default: st <= S_FETCH0;
      endcase
    end
  end
endmodule
