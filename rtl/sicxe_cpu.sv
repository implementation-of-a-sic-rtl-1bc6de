// sicxe_cpu: non-pipelined SIC/XE processor (datapath and control FSM).
//
// One instruction is carried out at a time, in a sequence of steps run by
// a finite-state machine: fetch the instruction one byte per memory cycle
// (1 to 4 bytes), decode it, compute the target address, follow an
// indirect pointer, read the operand, execute in the ALU, and write the
// result back. All arithmetic, including PC increments and target-address
// sums, goes through the single 24-bit ALU, whose operands come from two
// multiplexers over the architectural registers, the temporaries T1 to T3,
// PC, IL, TARGET, DEV, MEM (byte or word view) and the address fields of
// INSN (format 3 unsigned and sign-extended, format 4, SIC). ALU results
// go to RES before being written to the register block, or directly to PC,
// IL, TARGET, DEV or MEM. This follows the document's datapath; the exact
// sequence of states is this design's own.
//
// Memory port: 20-bit address, 8-bit data each way. The CPU holds mem_rd
// or mem_wr until mem_done is high for one cycle; it reads mem_din in that
// cycle. Words are 3 bytes, big-endian, unaligned, and take 3 memory
// cycles. The address comes from PC for instruction bytes and from TARGET
// otherwise.
// Device port: port_id is TARGET[7:0]. dev_rd or dev_wr is high for one
// cycle; port_in is sampled one cycle later, so an I/O access takes two
// cycles.
// Control: rst clears every register and restarts at address 0. When
// enable is low the CPU finishes the current instruction and then waits.
// An illegal opcode, register number or addressing mode (including
// immediate addressing on a store, DIV/float/privileged instructions that
// this hardware leaves out) stops the CPU with error high until reset.
// Interrupts: a request on `irq_req` while register I is 1 is latched and
// taken at the next instruction boundary: IL <= PC, ICC <= CC, I <= 0,
// PC <= word at 0xffffd. EINT sets IN, which is copied to I at the end of
// the following instruction, so an interrupt handler can end with
// EINT, RINT; DINT clears both at once; RINT restores PC and CC.
// STSW stores CC as a word (CC in bits 1..0, the rest 0) through the CC
// input of the first ALU multiplexer.
// The delayed enable, the STSW word layout, TD always answering "ready"
// (CC = less) and immediate jumps going to the target address are this
// design's choices.
module sicxe_cpu
  import sicxe_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        irq_req,
  output logic        error,
  // memory bus
  output logic [19:0] mem_addr,
  output logic [7:0]  mem_dout,
  input  logic [7:0]  mem_din,
  output logic        mem_rd,
  output logic        mem_wr,
  input  logic        mem_done,
  // device bus
  output logic [7:0]  port_id,
  output logic [7:0]  port_out,
  input  logic [7:0]  port_in,
  output logic        dev_rd,
  output logic        dev_wr,
  // architectural state, for observation
  output logic [19:0] pc_o,
  output logic [1:0]  cc_o,
  output logic        i_o,
  output logic        at_boundary
);

  typedef enum logic [4:0] {
    S_BOUND, S_FETCH, S_EXEC1, S_REGRD, S_EXEC2, S_WB, S_TIXCMP,
    S_DECODE, S_INDEX, S_MODE, S_IND, S_INDSET, S_OPER, S_OPRD, S_EXEC,
    S_WDPREP, S_IOREQ, S_IODONE, S_RDEXEC, S_STPREP, S_STWR, S_JUMP,
    S_JSUB, S_RSUB, S_IRQ0, S_IRQ1, S_IRQRD, S_IRQJMP, S_ERROR
  } state_e;

  typedef enum logic [3:0] {
    A_CC, A_ONE, A_VEC, A_A, A_X, A_L, A_B, A_T2, A_T3, A_PC
  } asel_e;

  typedef enum logic [3:0] {
    B_T1, B_X, B_PC, B_IL, B_TARGET, B_DEV, B_MEMBYTE, B_MEMWORD,
    B_F3, B_F3SGN, B_F4, B_SIC, B_ZERO
  } bsel_e;

  state_e      state;
  logic [19:0] pc, il, target;
  logic [1:0]  cc, icc;
  logic        i_en, i_next, irq_pend;
  logic [23:0] mem_r, t1, t2, t3, res;
  logic [7:0]  dev_r;
  logic [31:0] insn;
  logic [1:0]  cnt;
  logic [3:0]  wdst;
  logic        tix;

  // datapath control
  asel_e       asel;
  bsel_e       bsel;
  alu_op_e     aop;
  logic [23:0] alu_a, alu_b, alu_y;
  logic [1:0]  alu_cmp;
  logic [4:0]  shamt;

  // register block
  logic [3:0]  ra1, ra2;
  logic [23:0] rd1, rd2, reg_a, reg_x, reg_l, reg_b;
  logic        rf_we;

  // instruction fields
  logic [7:0]  op8, op6;
  logic [3:0]  r1, r2;
  logic        fn, fi, fx, fb, fp, fe;
  logic        f_imm, f_ind, f_sic;

  assign op8   = insn[31:24];
  assign op6   = {insn[31:26], 2'b00};
  assign r1    = insn[23:20];
  assign r2    = insn[19:16];
  assign fn    = insn[25];
  assign fi    = insn[24];
  assign fx    = insn[23];
  assign fb    = insn[22];
  assign fp    = insn[21];
  assign fe    = insn[20];
  assign f_sic = !fn && !fi;
  assign f_imm = !fn && fi;
  assign f_ind = fn && !fi;

  // instruction classes (format SIC/3/4)
  logic c_load, c_store, c_jump, c_byte, c_io;
  logic [3:0] ld_reg, st_reg;
  always_comb begin
    c_load = 1'b0; c_store = 1'b0; c_jump = 1'b0;
    c_byte = 1'b0; c_io = 1'b0;
    ld_reg = R_A; st_reg = R_A;
    unique case (op6)
      OP_LDA:  begin c_load = 1'b1; ld_reg = R_A; end
      OP_LDX:  begin c_load = 1'b1; ld_reg = R_X; end
      OP_LDL:  begin c_load = 1'b1; ld_reg = R_L; end
      OP_LDB:  begin c_load = 1'b1; ld_reg = R_B; end
      OP_LDS:  begin c_load = 1'b1; ld_reg = R_S; end
      OP_LDT:  begin c_load = 1'b1; ld_reg = R_T; end
      OP_STA:  begin c_store = 1'b1; st_reg = R_A; end
      OP_STX:  begin c_store = 1'b1; st_reg = R_X; end
      OP_STL:  begin c_store = 1'b1; st_reg = R_L; end
      OP_STB:  begin c_store = 1'b1; st_reg = R_B; end
      OP_STS:  begin c_store = 1'b1; st_reg = R_S; end
      OP_STT:  begin c_store = 1'b1; st_reg = R_T; end
      OP_STCH: begin c_store = 1'b1; st_reg = R_A; end
      OP_STSW: c_store = 1'b1;
      OP_J, OP_JEQ, OP_JGT, OP_JLT, OP_JSUB: c_jump = 1'b1;
      OP_LDCH: c_byte = 1'b1;
      OP_RD, OP_WD, OP_TD: begin c_byte = 1'b1; c_io = 1'b1; end
      default: ;
    endcase
  end

  // Illegal addressing-bit combinations (formats 3 and 4)
  logic bad_mode;
  assign bad_mode = !f_sic && ((fb && fp) || (fe && (fb || fp)) || (fx && (fn != fi)));

  logic jump_taken;
  always_comb begin
    unique case (op6)
      OP_JEQ:  jump_taken = (cc == CC_EQ);
      OP_JGT:  jump_taken = (cc == CC_GT);
      OP_JLT:  jump_taken = (cc == CC_LT);
      default: jump_taken = 1'b1;
    endcase
  end

  // Register block
  sicxe_regfile u_regs (
    .clk, .rst,
    .ra1, .ra2, .rd1, .rd2,
    .we(rf_we), .wa(wdst), .wd(res),
    .reg_a, .reg_x, .reg_l, .reg_b
  );
  assign ra1 = (state == S_OPER) ? st_reg : r1;
  assign ra2 = r2;
  assign rf_we = (state == S_WB) || (state == S_JSUB);

  // ALU operand multiplexers
  always_comb begin
    unique case (asel)
      A_ONE:   alu_a = 24'd1;
      A_VEC:   alu_a = 24'(IRQ_VECTOR);
      A_A:     alu_a = reg_a;
      A_X:     alu_a = reg_x;
      A_L:     alu_a = reg_l;
      A_B:     alu_a = reg_b;
      A_T2:    alu_a = t2;
      A_T3:    alu_a = t3;
      A_PC:    alu_a = 24'(pc);
      A_CC:    alu_a = 24'(cc);
      default: alu_a = '0;
    endcase
    unique case (bsel)
      B_T1:      alu_b = t1;
      B_X:       alu_b = reg_x;
      B_PC:      alu_b = 24'(pc);
      B_IL:      alu_b = 24'(il);
      B_TARGET:  alu_b = 24'(target);
      B_DEV:     alu_b = 24'(dev_r);
      B_MEMBYTE: alu_b = 24'(mem_r[7:0]);
      B_MEMWORD: alu_b = mem_r;
      B_F3:      alu_b = 24'(insn[19:8]);
      B_F3SGN:   alu_b = {{12{insn[19]}}, insn[19:8]};
      B_F4:      alu_b = 24'(insn[19:0]);
      B_SIC:     alu_b = 24'(insn[22:8]);
      default:   alu_b = '0;
    endcase
  end

  sicxe_alu u_alu (
    .op(aop), .a(alu_a), .b(alu_b), .shamt, .result(alu_y), .cmp(alu_cmp)
  );
  assign shamt = 5'(r2) + 5'd1;

  // Operand as seen by memory-operand instructions
  bsel_e opnd_sel;
  assign opnd_sel = f_imm ? B_TARGET : (c_byte ? B_MEMBYTE : B_MEMWORD);

  // Control: choose ALU operation and operands for the current state
  always_comb begin
    asel = A_ONE;
    bsel = B_PC;
    aop  = ALU_ADD;
    unique case (state)
      S_FETCH, S_IND, S_OPRD, S_STWR, S_IRQRD: begin
        // address increment: PC + 1 while fetching, TARGET + 1 otherwise
        asel = A_ONE;
        bsel = (state == S_FETCH) ? B_PC : B_TARGET;
        aop  = ALU_ADD;
      end
      S_EXEC1: begin bsel = B_IL; aop = ALU_PASSB; end
      S_EXEC2: begin
        unique case (op8)
          OP_ADDR:  begin asel = A_T3; bsel = B_T1; aop = ALU_ADD; end
          OP_SUBR:  begin asel = A_T3; bsel = B_T1; aop = ALU_SUB; end
          OP_MULR:  begin asel = A_T3; bsel = B_T1; aop = ALU_MUL; end
          OP_COMPR: begin asel = A_T3; bsel = B_T1; aop = ALU_SUB; end
          OP_RMO:   begin asel = A_T2; aop = ALU_PASSA; end
          OP_CLEAR: begin bsel = B_ZERO; aop = ALU_PASSB; end
          OP_SHIFTL: begin asel = A_T2; aop = ALU_SHL; end
          OP_SHIFTR: begin asel = A_T2; aop = ALU_SHR; end
          OP_TIXR:  begin asel = A_ONE; bsel = B_X; aop = ALU_ADD; end
          default:  ;
        endcase
      end
      S_TIXCMP: begin
        asel = A_X;
        bsel = (insn_format(op8) == FMT_2) ? B_T1 : opnd_sel;
        aop  = ALU_SUB;
      end
      S_DECODE: begin
        aop = ALU_PASSB;
        if (f_sic)   bsel = B_SIC;
        else if (fe) bsel = B_F4;
        else if (fp) begin asel = A_PC; bsel = B_F3SGN; aop = ALU_ADD; end
        else if (fb) begin asel = A_B;  bsel = B_F3;    aop = ALU_ADD; end
        else         bsel = B_F3;
      end
      S_INDEX:  begin asel = A_X; bsel = B_TARGET; aop = ALU_ADD; end
      S_INDSET: begin bsel = B_MEMWORD; aop = ALU_PASSB; end
      S_EXEC: begin
        bsel = opnd_sel;
        asel = A_A;
        if (c_load)      aop = ALU_PASSB;
        else if (c_io)   aop = ALU_PASSB;
        else if (op6 == OP_LDCH) aop = ALU_BYTE;
        else begin
          unique case (op6)
            OP_ADD:  aop = ALU_ADD;
            OP_SUB:  aop = ALU_SUB;
            OP_MUL:  aop = ALU_MUL;
            OP_AND:  aop = ALU_AND;
            OP_OR:   aop = ALU_OR;
            OP_COMP: aop = ALU_SUB;
            OP_TIX:  begin asel = A_ONE; bsel = B_X; aop = ALU_ADD; end
            default: ;
          endcase
        end
      end
      S_WDPREP: begin asel = A_A; aop = ALU_PASSA; end
      S_RDEXEC: begin asel = A_A; bsel = B_DEV; aop = ALU_BYTE; end
      S_STPREP: begin asel = (op6 == OP_STSW) ? A_CC : A_T2; aop = ALU_PASSA; end
      S_JUMP:   begin asel = A_PC; bsel = B_TARGET; aop = (op6 == OP_JSUB) ? ALU_PASSA : ALU_PASSB; end
      S_JSUB:   begin bsel = B_TARGET; aop = ALU_PASSB; end
      S_RSUB:   begin asel = A_L; aop = ALU_PASSA; end
      S_IRQ0:   begin bsel = B_PC; aop = ALU_PASSB; end
      S_IRQ1:   begin asel = A_VEC; aop = ALU_PASSA; end
      S_IRQJMP: begin bsel = B_MEMWORD; aop = ALU_PASSB; end
      default: ;
    endcase
  end

  // Memory and device bus outputs
  always_comb begin
    mem_rd   = (state == S_FETCH) || (state == S_IND) || (state == S_OPRD) || (state == S_IRQRD);
    mem_wr   = (state == S_STWR);
    mem_addr = (state == S_FETCH) ? pc : target;
    if (op6 == OP_STCH) mem_dout = mem_r[7:0];
    else begin
      unique case (cnt)
        2'd2:    mem_dout = mem_r[23:16];
        2'd1:    mem_dout = mem_r[15:8];
        default: mem_dout = mem_r[7:0];
      endcase
    end
  end
  assign port_id  = target[7:0];
  assign port_out = dev_r;
  assign dev_rd   = (state == S_IOREQ) && (op6 == OP_RD);
  assign dev_wr   = (state == S_IOREQ) && (op6 == OP_WD);
  assign error    = (state == S_ERROR);
  assign pc_o     = pc;
  assign cc_o     = cc;
  assign i_o      = i_en;
  assign at_boundary = (state == S_BOUND);

  // Interrupt request latch: requests are ignored while I is 0
  always_ff @(posedge clk) begin
    if (rst || !i_en) irq_pend <= 1'b0;
    else if (irq_req) irq_pend <= 1'b1;
  end

  // Sequencer and datapath registers
  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_BOUND;
      pc     <= '0;
      il     <= '0;
      target <= '0;
      cc     <= CC_LT;
      icc    <= CC_LT;
      i_en   <= 1'b0;
      i_next <= 1'b0;
      mem_r  <= '0;
      t1     <= '0;
      t2     <= '0;
      t3     <= '0;
      res    <= '0;
      dev_r  <= '0;
      insn   <= '0;
      cnt    <= '0;
      wdst   <= '0;
      tix    <= 1'b0;
    end else begin
      unique case (state)
        S_BOUND: begin
          i_en <= i_next;
          cnt  <= '0;
          tix  <= 1'b0;
          if (irq_pend && i_en) state <= S_IRQ0;
          else if (enable) begin
            insn  <= '0;
            state <= S_FETCH;
          end
        end

        S_FETCH: if (mem_done) begin
          pc <= alu_y[19:0];
          cnt <= cnt + 2'd1;
          unique case (cnt)
            2'd0: begin
              insn[31:24] <= mem_din;
              unique case (insn_format(mem_din))
                FMT_BAD: state <= S_ERROR;
                FMT_1:   state <= S_EXEC1;
                default: ;
              endcase
            end
            2'd1: begin
              insn[23:16] <= mem_din;
              if (insn_format(op8) == FMT_2) state <= S_REGRD;
            end
            2'd2: begin
              insn[15:8] <= mem_din;
              if (f_sic || !fe) state <= S_DECODE;
            end
            default: begin
              insn[7:0] <= mem_din;
              state <= S_DECODE;
            end
          endcase
        end

        // Format 1: interrupt control
        S_EXEC1: begin
          state <= S_BOUND;
          unique case (op8)
            OP_EINT: i_next <= 1'b1;
            OP_DINT: begin i_next <= 1'b0; i_en <= 1'b0; end
            OP_RINT: begin pc <= alu_y[19:0]; cc <= icc; end
            default: state <= S_ERROR;
          endcase
        end

        // Format 2: read r1 and r2 into the temporaries
        S_REGRD: begin
          t1 <= rd1;
          t2 <= rd1;
          t3 <= rd2;
          if (r1 > R_T) state <= S_ERROR;
          else if ((op8 == OP_ADDR || op8 == OP_SUBR || op8 == OP_MULR ||
                    op8 == OP_COMPR || op8 == OP_RMO) && r2 > R_T)
            state <= S_ERROR;
          else state <= S_EXEC2;
        end

        S_EXEC2: begin
          res   <= alu_y;
          state <= S_WB;
          unique case (op8)
            OP_ADDR, OP_SUBR, OP_MULR, OP_RMO: wdst <= r2;
            OP_CLEAR, OP_SHIFTL, OP_SHIFTR:    wdst <= r1;
            OP_TIXR: begin wdst <= R_X; tix <= 1'b1; end
            OP_COMPR: begin
              // ALU compared r2 with r1; turn it around
              cc <= (alu_cmp == CC_LT) ? CC_GT : (alu_cmp == CC_GT) ? CC_LT : CC_EQ;
              state <= S_BOUND;
            end
            default: state <= S_ERROR;
          endcase
        end

        S_WB: state <= tix ? S_TIXCMP : S_BOUND;

        S_TIXCMP: begin
          cc    <= alu_cmp;
          state <= S_BOUND;
        end

        // Formats SIC/3/4: base of the target address
        S_DECODE: begin
          if (op6 == OP_RSUB) state <= S_RSUB;
          else if (bad_mode || (c_store && f_imm)) state <= S_ERROR;
          else begin
            target <= alu_y[19:0];
            state  <= fx ? S_INDEX : S_MODE;
          end
        end

        S_INDEX: begin
          target <= alu_y[19:0];
          state  <= S_MODE;
        end

        S_MODE: begin
          cnt   <= 2'd2;
          state <= f_ind ? S_IND : S_OPER;
        end

        S_IND: if (mem_done) begin
          mem_r  <= {mem_r[15:0], mem_din};
          target <= alu_y[19:0];
          cnt    <= cnt - 2'd1;
          if (cnt == 2'd0) state <= S_INDSET;
        end

        S_INDSET: begin
          target <= alu_y[19:0];
          state  <= S_OPER;
        end

        S_OPER: begin
          t2  <= rd1;
          cnt <= c_byte ? 2'd0 : 2'd2;
          if (c_jump) state <= S_JUMP;
          else if (c_store) state <= S_STPREP;
          else if (f_imm) state <= S_EXEC;
          else state <= S_OPRD;
        end

        S_OPRD: if (mem_done) begin
          mem_r  <= {mem_r[15:0], mem_din};
          target <= alu_y[19:0];
          cnt    <= cnt - 2'd1;
          if (cnt == 2'd0) state <= S_EXEC;
        end

        S_EXEC: begin
          res   <= alu_y;
          state <= S_WB;
          if (c_load) wdst <= ld_reg;
          else if (c_io) begin
            target <= alu_y[19:0];
            unique case (op6)
              OP_RD:   state <= S_IOREQ;
              OP_WD:   state <= S_WDPREP;
              default: begin cc <= CC_LT; state <= S_BOUND; end
            endcase
          end
          else if (op6 == OP_COMP) begin
            cc    <= alu_cmp;
            state <= S_BOUND;
          end
          else if (op6 == OP_TIX) begin
            wdst <= R_X;
            tix  <= 1'b1;
          end
          else wdst <= R_A;
        end

        S_WDPREP: begin
          dev_r <= alu_y[7:0];
          state <= S_IOREQ;
        end

        S_IOREQ: state <= S_IODONE;

        S_IODONE: begin
          if (op6 == OP_RD) begin
            dev_r <= port_in;
            state <= S_RDEXEC;
          end else state <= S_BOUND;
        end

        S_RDEXEC: begin
          res   <= alu_y;
          wdst  <= R_A;
          state <= S_WB;
        end

        S_STPREP: begin
          mem_r <= alu_y;
          cnt   <= (op6 == OP_STCH) ? 2'd0 : 2'd2;
          state <= S_STWR;
        end

        S_STWR: if (mem_done) begin
          target <= alu_y[19:0];
          cnt    <= cnt - 2'd1;
          if (cnt == 2'd0) state <= S_BOUND;
        end

        S_JUMP: begin
          if (op6 == OP_JSUB) begin
            res   <= alu_y;
            wdst  <= R_L;
            state <= S_JSUB;
          end else begin
            if (jump_taken) pc <= alu_y[19:0];
            state <= S_BOUND;
          end
        end

        S_JSUB: begin
          pc    <= alu_y[19:0];
          state <= S_BOUND;
        end

        S_RSUB: begin
          pc    <= alu_y[19:0];
          state <= S_BOUND;
        end

        // Interrupt entry
        S_IRQ0: begin
          il     <= alu_y[19:0];
          icc    <= cc;
          i_en   <= 1'b0;
          i_next <= 1'b0;
          state  <= S_IRQ1;
        end

        S_IRQ1: begin
          target <= alu_y[19:0];
          cnt    <= 2'd2;
          state  <= S_IRQRD;
        end

        S_IRQRD: if (mem_done) begin
          mem_r  <= {mem_r[15:0], mem_din};
          target <= alu_y[19:0];
          cnt    <= cnt - 2'd1;
          if (cnt == 2'd0) state <= S_IRQJMP;
        end

        S_IRQJMP: begin
          pc    <= alu_y[19:0];
          state <= S_BOUND;
        end

        S_ERROR: ;

        default: state <= S_ERROR;
      endcase
    end
  end

  // A memory request is held until it completes
  property p_req_held;
    @(posedge clk) disable iff (rst) (mem_rd && !mem_done) |=> mem_rd;
  endproperty
  a_req_held: assert property (p_req_held);
  a_no_rdwr: assert property (@(posedge clk) disable iff (rst) !(mem_rd && mem_wr));
endmodule
