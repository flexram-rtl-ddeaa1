// pa_core: a FlexRAM P.Array, the simple 32-bit fixed-point engine placed next
// to each 1-Mbyte DRAM bank.
//
// Pipeline: four stages, IF (instruction memory read), ID (decode, register
// read), EX (ALU, branch, address translation, memory and multiplier access)
// and WB (register write). There are 16 general-purpose registers and 28
// 16-bit instructions (see flexram_pkg for the opcodes):
//   ADD SUB AND OR XOR SLL SRL SRA SLT MOV MUL   rA = rA op rB
//   ADDI LI ORI SLLI                            rA = rA op imm7 (LI: sext imm7)
//   LW SW LB SB                                 rA <-> mem[rB + off3 (x4 for words)]
//   BEQZ BNEZ                                   if rA ==/!= 0: pc += sext(imm7)
//   J JAL JR                                    pc += sext(off11); JAL: r15 = pc+1; JR: pc = rA
//   BCR BCF                                     rA = broadcast word (clears flag) / flag
//   NTF                                         notify bit = imm7[0]
//   HALT (opcode 0)                             stop; wait for the next start
// Results reach the next instruction through a bypass from WB and a
// write-through register file, so ALU sequences never stall. Branches are
// resolved in EX, which costs 2 cycles when taken (the FlexRAM branch
// penalty). Loads and multiplies hold EX until their data arrives. Stores go
// into a 1-entry store buffer and EX moves on; a second store, or a load,
// waits until the buffer has drained, which keeps memory order. NTF and HALT
// also wait for the buffer to drain, so that a P.Mem that sees the notify bit
// or the halt also sees every store made before it.
//
// Data addresses are virtual. The 8-entry TLB (pa_tlb) gives the physical page:
// the own bank or one of the two neighbour banks (the logical ring), plus the
// page in that bank. On a TLB miss a walker reads the mapping table kept at
// MAP_BASE in the own bank: word 0 holds the number of entries, and entry k, at
// MAP_BASE + 16*(k+1), holds {.., pbase PPN, vlimit VPN, vbase VPN} (one
// 128-bit read each) for one data structure. The first entry whose range holds
// the page gives PPN = pbase + (VPN - vbase), which is written into the TLB and
// the access retried. No matching entry stops the P.Array with fault set.
// Instruction fetches are not translated.
//
// Interface: start (pulse) with start_pc begins execution and flushes the TLB;
// halted/fault report the end. imem_addr is presented one cycle before
// imem_rdata. mem_* is a valid/ready request with one outstanding access and a
// response pulse. mul_req is held until mul_done. bc_valid writes the
// broadcast register and sets its flag; notify drives one bit of the P.Mem's
// notify register.
// The pipeline depth, register count, instruction count and width, store
// buffer, TLB size, base/limit mapping table, broadcast and notify follow the
// FlexRAM design; the instruction encoding, table layout, page size and
// MAP_BASE are this design's own choices.
module pa_core
  import flexram_pkg::*;
#(
  parameter logic [BANK_AW-1:0] MAP_BASE = 20'hFF000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [IADDR_W-1:0] start_pc,
  output logic               running,
  output logic               halted,
  output logic               fault,
  output logic [IADDR_W-1:0] imem_addr,
  input  logic [15:0]        imem_rdata,
  output logic               mem_valid,
  input  logic               mem_ready,
  output pa_req_t            mem_req,
  input  logic               mem_rsp_valid,
  input  logic [DL_W-1:0]    mem_rsp_rdata,
  output logic               mul_req,
  output logic [31:0]        mul_a,
  output logic [31:0]        mul_b,
  input  logic               mul_done,
  input  logic [31:0]        mul_result,
  input  logic               bc_valid,
  input  logic [31:0]        bc_data,
  output logic               notify
);
  typedef enum logic [2:0] {
    MS_IDLE, MS_LD_WAIT, MS_W_HDR, MS_W_HDR_WAIT, MS_W_ENT, MS_W_ENT_WAIT, MS_FAULT
  } ms_e;

  // ---------------- register file ----------------
  logic [31:0] rf [16];

  // ---------------- IF ----------------
  logic               f_valid;
  logic [IADDR_W-1:0] f_pc;
  // ---------------- ID ----------------
  logic               d_valid;
  logic [15:0]        d_inst;
  logic [IADDR_W-1:0] d_pc;
  // ---------------- EX ----------------
  logic               e_valid;
  pa_op_e             e_op;
  logic [3:0]         e_ra, e_rb;
  logic [31:0]        e_a, e_b;
  logic [10:0]        e_imm;
  logic [IADDR_W-1:0] e_pc;
  // ---------------- WB ----------------
  logic               w_valid;
  logic [3:0]         w_rd;
  logic [31:0]        w_val;

  logic stall_e, ex_done, redirect, kill;
  logic [IADDR_W-1:0] redirect_pc;

  // ---------------- store buffer and port ----------------
  logic    sb_valid, sb_sent, port_busy, port_is_sb;
  pa_req_t sb_req;
  ms_e     ms;
  logic    ex_rd;
  pa_req_t ex_rd_req;
  logic [7:0] w_cnt, w_k;

  // ---------------- broadcast ----------------
  logic [31:0] bc_reg;
  logic        bc_flag;

  // ---------------- TLB ----------------
  logic             tlb_hit, tlb_fill;
  logic [PPN_W-1:0] tlb_ppn, fill_ppn;
  logic [31:0]      vaddr;
  logic [VPN_W-1:0] vpn;
  logic [BANK_AW-1:0] paddr;

  // ========== IF ==========
  logic stall_d;
  assign stall_d = stall_e;

  always_comb begin
    if (redirect)     imem_addr = redirect_pc;
    else if (stall_d) imem_addr = f_pc;
    else              imem_addr = f_pc + 1'b1;
  end

  // ========== ID: decode and register read ==========
  pa_op_e       d_op;
  logic [3:0]   d_ra, d_rb;
  logic [31:0]  d_a, d_b;
  assign d_op = pa_op_e'(d_inst[15:11]);
  assign d_ra = d_inst[10:7];
  assign d_rb = d_inst[6:3];
  assign d_a  = (w_valid && w_rd == d_ra) ? w_val : rf[d_ra];
  assign d_b  = (w_valid && w_rd == d_rb) ? w_val : rf[d_rb];

  // ========== EX ==========
  logic [31:0] fa, fb, imm7s, res;
  logic        e_wr, is_load, is_store, is_word;
  logic [3:0]  e_rd;

  assign fa    = (w_valid && w_rd == e_ra) ? w_val : e_a;
  assign fb    = (w_valid && w_rd == e_rb) ? w_val : e_b;
  assign imm7s = {{25{e_imm[6]}}, e_imm[6:0]};
  assign is_load  = e_op inside {OP_LW, OP_LB};
  assign is_store = e_op inside {OP_SW, OP_SB};
  assign is_word  = e_op inside {OP_LW, OP_SW};
  assign vaddr = fb + (is_word ? {27'd0, e_imm[2:0], 2'b00} : {29'd0, e_imm[2:0]});
  assign vpn   = vaddr[31:PAGE_BITS];
  assign paddr = {tlb_ppn[BANK_AW-PAGE_BITS-1:0], vaddr[PAGE_BITS-1:0]};
  assign e_rd  = (e_op == OP_JAL) ? 4'd15 : e_ra;
  assign e_wr  = !(e_op inside {OP_SW, OP_SB, OP_BEQZ, OP_BNEZ, OP_J, OP_JR, OP_NTF, OP_HALT});

  pa_tlb u_tlb (
    .clk, .rst_n, .flush(start), .vpn, .hit(tlb_hit), .ppn(tlb_ppn),
    .fill(tlb_fill), .fill_vpn(vpn), .fill_ppn
  );

  // load data selection
  logic [31:0] ld_word, ld_val;
  assign ld_word = mem_rsp_rdata[paddr[3:2]*32 +: 32];
  assign ld_val  = (e_op == OP_LB) ? {24'd0, mem_rsp_rdata[paddr[3:0]*8 +: 8]} : ld_word;

  always_comb begin
    unique case (e_op)
      OP_ADD:  res = fa + fb;
      OP_SUB:  res = fa - fb;
      OP_AND:  res = fa & fb;
      OP_OR:   res = fa | fb;
      OP_XOR:  res = fa ^ fb;
      OP_SLL:  res = fa << fb[4:0];
      OP_SRL:  res = fa >> fb[4:0];
      OP_SRA:  res = $signed(fa) >>> fb[4:0];
      OP_SLT:  res = {31'd0, $signed(fa) < $signed(fb)};
      OP_MOV:  res = fb;
      OP_MUL:  res = mul_result;
      OP_ADDI: res = fa + imm7s;
      OP_LI:   res = imm7s;
      OP_ORI:  res = fa | {25'd0, e_imm[6:0]};
      OP_SLLI: res = fa << e_imm[4:0];
      OP_LW, OP_LB: res = ld_val;
      OP_JAL:  res = 32'(e_pc + 1'b1);
      OP_BCR:  res = bc_reg;
      OP_BCF:  res = {31'd0, bc_flag};
      default: res = '0;
    endcase
  end

  // completion of the instruction in EX
  always_comb begin
    ex_done = 1'b1;
    if (e_op == OP_MUL) ex_done = mul_done;
    else if (is_load)   ex_done = (ms == MS_LD_WAIT) && mem_rsp_valid && !port_is_sb;
    else if (is_store)  ex_done = (ms == MS_IDLE) && tlb_hit && !sb_valid;
    else if (e_op inside {OP_NTF, OP_HALT}) ex_done = !sb_valid;
  end
  assign stall_e = e_valid && !ex_done;

  // control transfer
  always_comb begin
    redirect    = 1'b0;
    redirect_pc = e_pc + 1'b1;
    if (start) begin
      redirect    = 1'b1;
      redirect_pc = start_pc;
    end else if (e_valid) begin
      unique case (e_op)
        OP_BEQZ: begin redirect = (fa == 0); redirect_pc = e_pc + imm7s[IADDR_W-1:0]; end
        OP_BNEZ: begin redirect = (fa != 0); redirect_pc = e_pc + imm7s[IADDR_W-1:0]; end
        OP_J, OP_JAL: begin redirect = 1'b1; redirect_pc = e_pc + IADDR_W'({{21{e_imm[10]}}, e_imm}); end
        OP_JR:   begin redirect = 1'b1; redirect_pc = fa[IADDR_W-1:0]; end
        default: ;
      endcase
    end
  end
  assign kill = (e_valid && e_op == OP_HALT) || (ms == MS_FAULT);

  // multiplier
  assign mul_req = e_valid && e_op == OP_MUL;
  assign mul_a   = fa;
  assign mul_b   = fb;

  // ========== memory port ==========
  always_comb begin
    ex_rd     = 1'b0;
    ex_rd_req = '0;
    tlb_fill  = 1'b0;
    fill_ppn  = '0;
    if (e_valid && !port_busy && !sb_valid) begin
      unique case (ms)
        MS_IDLE: if (is_load && tlb_hit) begin
          ex_rd             = 1'b1;
          ex_rd_req.tgt     = tgt_e'(tlb_ppn[PPN_W-1 -: 2]);
          ex_rd_req.req.addr = paddr;
        end
        MS_W_HDR: begin
          ex_rd              = 1'b1;
          ex_rd_req.tgt      = TGT_OWN;
          ex_rd_req.req.addr = MAP_BASE;
        end
        MS_W_ENT: begin
          ex_rd              = 1'b1;
          ex_rd_req.tgt      = TGT_OWN;
          ex_rd_req.req.addr = MAP_BASE + BANK_AW'({w_k + 8'd1, 4'd0});
        end
        default: ;
      endcase
    end
    if (ms == MS_W_ENT_WAIT && mem_rsp_valid && !port_is_sb &&
        vpn >= mem_rsp_rdata[VPN_W-1:0] && vpn <= mem_rsp_rdata[32 +: VPN_W]) begin
      tlb_fill = 1'b1;
      fill_ppn = mem_rsp_rdata[64 +: PPN_W] + PPN_W'(vpn - mem_rsp_rdata[VPN_W-1:0]);
    end
  end

  assign mem_valid = (sb_valid && !sb_sent && !port_busy) || ex_rd;
  assign mem_req   = (sb_valid && !sb_sent) ? sb_req : ex_rd_req;

  // ========== sequential ==========
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      halted    <= 1'b0;
      fault     <= 1'b0;
      f_valid   <= 1'b0;
      f_pc      <= '0;
      d_valid   <= 1'b0;
      d_inst    <= '0;
      d_pc      <= '0;
      e_valid   <= 1'b0;
      e_op      <= OP_HALT;
      e_ra      <= '0;
      e_rb      <= '0;
      e_a       <= '0;
      e_b       <= '0;
      e_imm     <= '0;
      e_pc      <= '0;
      w_valid   <= 1'b0;
      w_rd      <= '0;
      w_val     <= '0;
      sb_valid  <= 1'b0;
      sb_sent   <= 1'b0;
      sb_req    <= '0;
      port_busy <= 1'b0;
      port_is_sb <= 1'b0;
      ms        <= MS_IDLE;
      w_cnt     <= '0;
      w_k       <= '0;
      bc_reg    <= '0;
      bc_flag   <= 1'b0;
      notify    <= 1'b0;
      for (int i = 0; i < 16; i++) rf[i] <= '0;
    end else begin
      // ---- WB ----
      if (w_valid) rf[w_rd] <= w_val;

      // ---- broadcast register ----
      if (bc_valid) begin
        bc_reg  <= bc_data;
        bc_flag <= 1'b1;
      end else if (e_valid && e_op == OP_BCR) begin
        bc_flag <= 1'b0;
      end

      // ---- memory port bookkeeping ----
      if (mem_valid && mem_ready) begin
        port_busy  <= 1'b1;
        port_is_sb <= sb_valid && !sb_sent;
        if (sb_valid && !sb_sent) sb_sent <= 1'b1;
      end
      if (mem_rsp_valid && port_busy) begin
        port_busy <= 1'b0;
        if (port_is_sb) begin
          sb_valid <= 1'b0;
          sb_sent  <= 1'b0;
        end
      end

      // ---- EX memory state machine ----
      if (e_valid) begin
        unique case (ms)
          MS_IDLE: if ((is_load || is_store) && !tlb_hit) ms <= MS_W_HDR;
                   else if (is_load && ex_rd && mem_ready) ms <= MS_LD_WAIT;
          MS_LD_WAIT: if (mem_rsp_valid && !port_is_sb) ms <= MS_IDLE;
          MS_W_HDR: if (ex_rd && mem_ready) ms <= MS_W_HDR_WAIT;
          MS_W_HDR_WAIT: if (mem_rsp_valid && !port_is_sb) begin
            w_cnt <= mem_rsp_rdata[7:0];
            w_k   <= '0;
            ms    <= (mem_rsp_rdata[7:0] == 0) ? MS_FAULT : MS_W_ENT;
          end
          MS_W_ENT: if (ex_rd && mem_ready) ms <= MS_W_ENT_WAIT;
          MS_W_ENT_WAIT: if (mem_rsp_valid && !port_is_sb) begin
            if (tlb_fill)             ms <= MS_IDLE;
            else if (w_k + 1 == w_cnt) ms <= MS_FAULT;
            else begin
              w_k <= w_k + 1'b1;
              ms  <= MS_W_ENT;
            end
          end
          MS_FAULT: ms <= MS_IDLE;
          default: ms <= MS_IDLE;
        endcase
      end

      // store enters the store buffer
      if (e_valid && is_store && ex_done) begin
        sb_valid         <= 1'b1;
        sb_sent          <= 1'b0;
        sb_req.tgt       <= tgt_e'(tlb_ppn[PPN_W-1 -: 2]);
        sb_req.req.we    <= 1'b1;
        sb_req.req.addr  <= paddr;
        if (e_op == OP_SW) begin
          sb_req.req.wdata <= {4{fa}};
          sb_req.req.be    <= DL_BE'(16'h000f << (paddr[3:2] * 4));
        end else begin
          sb_req.req.wdata <= {16{fa[7:0]}};
          sb_req.req.be    <= DL_BE'(16'h0001 << paddr[3:0]);
        end
      end

      if (e_valid && e_op == OP_NTF) notify <= e_imm[0];

      // ---- pipeline registers ----
      w_valid <= e_valid && ex_done && e_wr && !kill;
      w_rd    <= e_rd;
      w_val   <= res;

      if (start) begin
        running <= 1'b1;
        halted  <= 1'b0;
        fault   <= 1'b0;
        f_valid <= 1'b1;
        f_pc    <= start_pc;
        d_valid <= 1'b0;
        e_valid <= 1'b0;
        ms      <= MS_IDLE;
      end else if (kill) begin
        running <= 1'b0;
        halted  <= 1'b1;
        fault   <= (ms == MS_FAULT);
        f_valid <= 1'b0;
        d_valid <= 1'b0;
        e_valid <= 1'b0;
      end else begin
        // IF
        if (redirect) begin
          f_pc    <= redirect_pc;
          f_valid <= running;
        end else if (!stall_d) begin
          f_pc <= f_pc + 1'b1;
        end
        // IF -> ID
        if (redirect) d_valid <= 1'b0;
        else if (!stall_d) begin
          d_valid <= f_valid;
          d_inst  <= imem_rdata;
          d_pc    <= f_pc;
        end
        // ID -> EX
        if (redirect) e_valid <= 1'b0;
        else if (!stall_e) begin
          e_valid <= d_valid;
          e_op    <= d_op;
          e_ra    <= d_ra;
          e_rb    <= d_rb;
          e_a     <= d_a;
          e_b     <= d_b;
          e_imm   <= d_inst[10:0];
          e_pc    <= d_pc;
        end else begin
          // keep the held operands current while EX waits
          e_a <= fa;
          e_b <= fb;
        end
      end
    end
  end

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    port_busy |-> !(mem_valid && mem_ready));

endmodule
