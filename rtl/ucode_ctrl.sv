// ucode_ctrl: microcode sequencer of one RPAU.
// The host writes a program of 64-bit instructions (instr_t) into the
// microcode store and pulses start. The sequencer steps through the program
// in order and hands each instruction to its execution unit: NTT/INTT to the
// NTT unit, DYA to the dyadic unit, SEND and RECV to the two link engines,
// SEED to the key PRNG. An instruction waits only while its own unit is still
// busy, so an NTT, a dyadic operation, a send and a receive can all run at
// once; this overlap of the NTT and dyadic cores is what shortens key
// switching. Ordering between units is the program's job: WAIT holds the
// sequencer until every unit named in imm[2:0] (NTT, dyadic, link) is idle.
// HALT ends the program and pulses done once all units are idle.
// Counters: cycles run, cycles stalled on a busy unit, and cycles in which the
// NTT and dyadic units were both busy.
// Timing: fetch is combinational from the store; one instruction is issued per
// cycle at most; a unit's busy is high from the cycle after its start.
// From the document: a microcoded controller and the parallel execution of the
// NTT and dyadic cores. This design's choices: the instruction format, the
// in-order issue and the WAIT synchronisation.
module ucode_ctrl
  import medha_pkg::*;
#(
  parameter int unsigned UDEPTH = 1024
)(
  input  logic                      clk,
  input  logic                      rst_n,
  // host
  input  logic                      uc_we,
  input  logic [$clog2(UDEPTH)-1:0] uc_addr,
  input  instr_t                    uc_data,
  input  logic                      start,
  output logic                      running,
  output logic                      done,
  // units
  input  logic                      ntt_busy,
  input  logic                      dya_busy,
  input  logic                      tx_busy,
  input  logic                      rx_busy,
  output logic                      ntt_start,
  output logic                      dya_start,
  output logic                      tx_start,
  output logic                      rx_start,
  output ucmd_t                     cmd,
  output logic                      seed_load,
  output logic [32:0]               seed,
  // counters
  output logic [31:0]               cnt_cycles,
  output logic [31:0]               cnt_stall,
  output logic [31:0]               cnt_overlap
);
  localparam int unsigned PW = $clog2(UDEPTH);

  instr_t         store [UDEPTH];
  logic [PW-1:0]  pc;
  instr_t         ir;
  logic           go, stall;
  logic           any_busy;

  always_ff @(posedge clk)
    if (uc_we) store[uc_addr] <= uc_data;

  assign ir       = store[pc];
  assign any_busy = ntt_busy | dya_busy | tx_busy | rx_busy;

  always_comb begin
    cmd.dyop    = ir.dyop;
    cmd.inverse = (ir.op == OP_INTT);
    cmd.dst     = ir.dst;
    cmd.a       = ir.a;
    cmd.b       = ir.b;
    cmd.c       = ir.c;
    seed        = ir.imm;
    stall = 1'b0;
    case (ir.op)
      OP_NTT, OP_INTT: stall = ntt_busy;
      OP_DYA:          stall = dya_busy;
      OP_SEND:         stall = tx_busy;
      OP_RECV:         stall = rx_busy;
      OP_WAIT:         stall = (ir.imm[0] & ntt_busy) | (ir.imm[1] & dya_busy) |
                               (ir.imm[2] & (tx_busy | rx_busy));
      OP_HALT:         stall = any_busy;
      default:         stall = 1'b0;
    endcase
    go = running && !stall;
    ntt_start = go && (ir.op == OP_NTT || ir.op == OP_INTT);
    dya_start = go && (ir.op == OP_DYA);
    tx_start  = go && (ir.op == OP_SEND);
    rx_start  = go && (ir.op == OP_RECV);
    seed_load = go && (ir.op == OP_SEED);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; running <= 1'b0; done <= 1'b0;
      cnt_cycles <= '0; cnt_stall <= '0; cnt_overlap <= '0;
    end else begin
      done <= 1'b0;
      if (!running && start) begin
        running <= 1'b1; pc <= '0;
        cnt_cycles <= '0; cnt_stall <= '0; cnt_overlap <= '0;
      end else if (running) begin
        cnt_cycles <= cnt_cycles + 1'b1;
        if (stall) cnt_stall <= cnt_stall + 1'b1;
        if (ntt_busy && dya_busy) cnt_overlap <= cnt_overlap + 1'b1;
        if (go) begin
          if (ir.op == OP_HALT) begin
            running <= 1'b0; done <= 1'b1;
          end else pc <= pc + 1'b1;
        end
      end
    end
  end

  // Every unit start is a single-cycle pulse given while that unit is idle.
  a_ntt_idle: assert property (@(posedge clk) disable iff (!rst_n) ntt_start |-> !ntt_busy);
  a_dya_idle: assert property (@(posedge clk) disable iff (!rst_n) dya_start |-> !dya_busy);

endmodule
