// pe: one DASX processing element, a 32-bit in-order 4-stage integer pipeline.
//
// Each PE runs one instance of the compute kernel with its own PC, fetched from
// the shared instruction buffer. It never forms a memory address: LD and ST
// name an object by (Collector id, key) and go straight to the Obj-Store,
// which the Collector has filled so that they cannot miss. %CUR holds the
// PE's loop cursor (the iteration it is working on).
//
// Iterations are assigned statically: in a tile [tile_start, tile_end) PE i
// runs iterations tile_start+i, tile_start+i+NPE, ... NEXT advances the
// cursor by NPE and writes 1 to rd if the PE has another iteration in the
// tile. When the cursor leaves the tile the PE waits (wait_tile) until the
// Collector has written back, refilled the Obj-Store and pulses tile_go; the
// PE then takes cursor tile_start+i of the new tile, or, once loop_done is
// set, completes NEXT with rd = 0 so the kernel can leave its loop and HALT.
// BAR waits at the array-wide barrier (%BAR). Before its first tile a PE is
// idle; the first tile_go for which it has an iteration starts it at PC 0.
// A halted PE becomes idle again when loop_done falls (next loop started).
//
// Pipeline: IF (PC -> instruction register), ID (decode, register read, WB
// bypass, interlock on a result still in EX), EX (ALU, branch, Obj-Store
// access, NEXT/BAR), WB (register write). Taken branches are resolved in EX
// and flush two instructions. The ISA encoding (see dasx_pkg) and the use of
// NEXT's result are own choices: the design gives only the special
// instructions and registers. The 32 floating-point registers and the FPU are
// not included.
module pe
  import dasx_pkg::*;
#(
  parameter int unsigned NPE   = 8,
  parameter int unsigned PE_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction buffer
  output logic [PC_W-1:0]   ib_pc,
  input  logic [31:0]       ib_instr,
  // Obj-Store
  output logic              os_req,
  output logic              os_we,
  output coll_id_t          os_coll,
  output key_t              os_key,
  output logic [31:0]       os_wdata,
  input  logic [31:0]       os_rdata,
  // tile control from the Collector group
  input  logic              tile_go,
  input  key_t              tile_start,
  input  key_t              tile_end,
  input  logic              loop_done,
  output logic              wait_tile,
  // barrier
  output logic              bar_arrive,
  input  logic              bar_release,
  // status
  output logic              halted,
  output logic [31:0]       retired
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_HALT} mode_e;
  mode_e mode;

  logic [31:0] regs [32];
  key_t        cur;
  logic        next_wait;   // NEXT parked in EX waiting for the next tile

  // pipeline registers
  logic [PC_W-1:0] pc;
  logic            id_valid;
  logic [31:0]     id_instr;
  logic [PC_W-1:0] id_pc;

  logic            ex_valid;
  opcode_e         ex_op;
  logic [4:0]      ex_rd;
  logic            ex_wr;
  logic [31:0]     ex_a, ex_b;
  logic [15:0]     ex_imm;
  logic [PC_W-1:0] ex_pc;

  logic            wb_valid;
  logic [4:0]      wb_rd;
  logic [31:0]     wb_val;

  // ---------------------------------------------------------------- decode
  opcode_e     id_op;
  logic [4:0]  id_s1, id_s2, id_rd;
  logic        id_use1, id_use2, id_wr;
  logic [31:0] id_v1, id_v2;

  always_comb begin
    id_op   = opcode_e'(id_instr[31:26]);
    id_rd   = id_instr[25:21];
    id_s1   = id_instr[20:16];
    id_s2   = id_instr[15:11];
    id_use1 = 1'b0;
    id_use2 = 1'b0;
    id_wr   = 1'b0;
    unique case (id_op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SLT, OP_MUL: begin
        id_use1 = 1'b1; id_use2 = 1'b1; id_wr = 1'b1;
      end
      OP_ADDI, OP_LD: begin id_use1 = 1'b1; id_wr = 1'b1; end
      OP_LUI, OP_CUR, OP_NEXT: id_wr = 1'b1;
      OP_BEQ, OP_BNE, OP_BLT, OP_ST: begin
        id_s1 = id_instr[25:21]; id_s2 = id_instr[20:16];
        id_use1 = 1'b1; id_use2 = 1'b1;
        if (id_op == OP_ST) begin   // a = key register, b = data
          id_s1 = id_instr[20:16]; id_s2 = id_instr[25:21];
        end
      end
      default: ;
    endcase
    if (id_rd == 5'd0) id_wr = 1'b0;
    id_v1 = (id_s1 == 5'd0) ? 32'h0 :
            (wb_valid && wb_rd == id_s1) ? wb_val : regs[id_s1];
    id_v2 = (id_s2 == 5'd0) ? 32'h0 :
            (wb_valid && wb_rd == id_s2) ? wb_val : regs[id_s2];
  end

  // ---------------------------------------------------------------- execute
  logic [31:0] ex_res;
  logic        ex_stall, ex_taken, ex_halt;
  logic [PC_W-1:0] ex_target;
  key_t        nc, ns;

  always_comb begin
    ex_res       = '0;
    ex_taken     = 1'b0;
    ex_stall     = 1'b0;
    ex_halt      = 1'b0;
    ex_target    = ex_pc + PC_W'(1) + PC_W'(ex_imm);
    os_req       = 1'b0;
    os_we        = 1'b0;
    os_coll      = coll_id_t'(ex_imm[15:13]);
    os_key       = ex_a + {{19{ex_imm[12]}}, ex_imm[12:0]};
    os_wdata     = ex_b;
    nc           = cur + key_t'(NPE);
    ns           = tile_start + key_t'(PE_ID);
    bar_arrive   = ex_valid && ex_op == OP_BAR;
    if (ex_valid) begin
      unique case (ex_op)
        OP_ADD:  ex_res = ex_a + ex_b;
        OP_SUB:  ex_res = ex_a - ex_b;
        OP_AND:  ex_res = ex_a & ex_b;
        OP_OR:   ex_res = ex_a | ex_b;
        OP_XOR:  ex_res = ex_a ^ ex_b;
        OP_SLL:  ex_res = ex_a << ex_b[4:0];
        OP_SRL:  ex_res = ex_a >> ex_b[4:0];
        OP_SLT:  ex_res = {31'h0, $signed(ex_a) < $signed(ex_b)};
        OP_MUL:  ex_res = ex_a * ex_b;
        OP_ADDI: ex_res = ex_a + {{16{ex_imm[15]}}, ex_imm};
        OP_LUI:  ex_res = {ex_imm, 16'h0};
        OP_BEQ:  ex_taken = (ex_a == ex_b);
        OP_BNE:  ex_taken = (ex_a != ex_b);
        OP_BLT:  ex_taken = ($signed(ex_a) < $signed(ex_b));
        OP_LD:   begin os_req = 1'b1; ex_res = os_rdata; end
        OP_ST:   begin os_req = 1'b1; os_we = 1'b1; end
        OP_CUR:  ex_res = cur;
        OP_NEXT: begin
          if (!next_wait) begin
            if (nc < tile_end) ex_res = 32'd1;
            else               ex_stall = 1'b1;
          end else if (tile_go && ns < tile_end) begin
            ex_res = 32'd1;
          end else if (loop_done && !tile_go) begin
            ex_res = 32'd0;
          end else begin
            ex_stall = 1'b1;
          end
        end
        OP_BAR:  ex_stall = !bar_release;
        OP_HALT: ex_halt = 1'b1;
        default: ;
      endcase
    end
  end

  logic id_hazard;
  assign id_hazard = id_valid && ex_valid && ex_wr &&
                     ((id_use1 && id_s1 == ex_rd) || (id_use2 && id_s2 == ex_rd));

  assign ib_pc     = pc;
  assign wait_tile = (mode != S_RUN) || next_wait;
  assign halted    = (mode == S_HALT);

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= S_IDLE;
      pc        <= '0;
      cur       <= '0;
      next_wait <= 1'b0;
      id_valid  <= 1'b0;
      id_instr  <= '0;
      id_pc     <= '0;
      ex_valid  <= 1'b0;
      ex_op     <= OP_NOP;
      ex_rd     <= '0;
      ex_wr     <= 1'b0;
      ex_a      <= '0;
      ex_b      <= '0;
      ex_imm    <= '0;
      ex_pc     <= '0;
      wb_valid  <= 1'b0;
      wb_rd     <= '0;
      wb_val    <= '0;
      retired   <= '0;
      for (int r = 0; r < 32; r++) regs[r] <= '0;
    end else begin
      // WB
      if (wb_valid) regs[wb_rd] <= wb_val;

      unique case (mode)
        S_IDLE: begin
          if (tile_go && ns < tile_end) begin
            mode <= S_RUN;
            pc   <= '0;
            cur  <= ns;
          end else if (loop_done && !tile_go) begin
            mode <= S_HALT;
          end
        end
        S_HALT: if (!loop_done) mode <= S_IDLE;   // a new loop was started
        S_RUN: begin
          // NEXT bookkeeping
          if (ex_valid && ex_op == OP_NEXT) begin
            if (!next_wait) begin
              if (nc < tile_end) cur <= nc;
              else               next_wait <= 1'b1;
            end else if (tile_go && ns < tile_end) begin
              cur       <= ns;
              next_wait <= 1'b0;
            end else if (loop_done && !tile_go) begin
              next_wait <= 1'b0;
            end
          end

          if (ex_halt) begin
            mode     <= S_HALT;
            id_valid <= 1'b0;
            ex_valid <= 1'b0;
            wb_valid <= 1'b0;
            retired  <= retired + 32'd1;
          end else if (ex_stall) begin
            wb_valid <= 1'b0;                 // EX, ID, IF hold
          end else begin
            // EX -> WB
            wb_valid <= ex_valid && ex_wr;
            wb_rd    <= ex_rd;
            wb_val   <= ex_res;
            if (ex_valid) retired <= retired + 32'd1;
            if (ex_taken) begin
              pc       <= ex_target;
              id_valid <= 1'b0;
              ex_valid <= 1'b0;
            end else if (id_hazard) begin
              ex_valid <= 1'b0;               // bubble, ID and IF hold
            end else begin
              // ID -> EX
              ex_valid <= id_valid;
              ex_op    <= id_op;
              ex_rd    <= id_rd;
              ex_wr    <= id_wr;
              ex_a     <= id_v1;
              ex_b     <= id_v2;
              ex_imm   <= id_instr[15:0];
              ex_pc    <= id_pc;
              // IF -> ID
              id_valid <= 1'b1;
              id_instr <= ib_instr;
              id_pc    <= pc;
              pc       <= pc + PC_W'(1);
            end
          end
        end
        default: mode <= S_IDLE;
      endcase
    end
  end

endmodule
