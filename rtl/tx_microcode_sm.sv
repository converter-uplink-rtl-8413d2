// Microcode state machine of one transmit data queue (A, B, C or D).
//
// Holds two 128 x 32-bit dual-ported RAMs, the microcode and the data pool, whose
// second port belongs to the management processor (cpu_*; cpu_pool selects the pool).
// One instruction is executed per clock:
//   bits 11..0  address of a data source, handed to the shared source multiplexer;
//               its data is written by the instruction two clocks later
//   bits 15..13 ignore the instruction on last / in-between / first cycles
//   bit 16      write the 32-bit source word into the queue FIFO
//   bit 17      give the arbiter the 'go' to start sending a frame
//   bit 31      end of program
// While idle the machine keeps executing instruction 0 (so instruction 0 should not
// write or start), which also issues its address early. A 'start' pulse (the
// acquisition cycle begins and the shared converter bus is granted) runs the
// program from instruction 1 onwards, one per clock, until the instruction with the
// end bit; 'done' pulses in that clock and the machine is idle again from the next.
// An instruction with the end bit that also writes marks that word as the end of
// the frame. Entry 127 ends the program in any case. The flags, their delays, the
// RAM sizes and the idle behaviour are from the uplink description; the end-of-frame
// marking by the end instruction and the stop at entry 127 are this design's choice.
//
// first/last are the flags of the current acquisition cycle, held by the engine.
// 'enable' (bit 0 of TRIG) must be high for anything to be executed.
module tx_microcode_sm
  import uplink_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        start,
  input  logic        first,
  input  logic        last,
  // processor port
  input  logic        cpu_we,
  input  logic        cpu_pool,
  input  logic [6:0]  cpu_idx,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  // shared data source
  output logic [11:0] src_addr,
  output logic [31:0] pool_rdata,
  input  logic [31:0] src_data,
  // queue FIFO
  output logic        fifo_wr,
  output logic [31:0] fifo_wdata,
  output logic        fifo_eof,
  output logic        start_tx,
  output logic        busy,
  output logic        done
);
  logic [31:0] ucode [UC_DEPTH];
  logic [31:0] pool  [UC_DEPTH];
  logic [31:0] ucode_cpu_q, pool_cpu_q, ir_raw;
  logic [6:0]  pc, fetch;
  logic        running, cpu_pool_q;
  tx_ucode_t   ir;
  logic        ignored, end_now;

  // processor side of both RAMs
  always_ff @(posedge clk) begin
    if (cpu_we && !cpu_pool) ucode[cpu_idx] <= cpu_wdata;
    if (cpu_we &&  cpu_pool) pool[cpu_idx]  <= cpu_wdata;
    ucode_cpu_q <= ucode[cpu_idx];
    pool_cpu_q  <= pool[cpu_idx];
    cpu_pool_q  <= cpu_pool;
  end
  assign cpu_rdata = cpu_pool_q ? pool_cpu_q : ucode_cpu_q;

  // state machine side: instruction fetch and pool read
  always_ff @(posedge clk) begin
    ir_raw     <= ucode[fetch];
    pool_rdata <= pool[src_addr[6:0]];
  end

  assign ir       = tx_ucode_t'(ir_raw);
  assign src_addr = ir.addr;
  assign ignored  = ucode_ignored(ir.ign_last, ir.ign_mid, ir.ign_first, first, last);
  assign end_now  = running && (ir.end_prog || pc == 7'(UC_DEPTH - 1));
  assign done     = end_now;
  assign busy     = running;

  always_comb begin
    if (running && !end_now) fetch = pc + 1'b1;
    else if (!running && start && enable) fetch = 7'd1;
    else fetch = 7'd0;
  end

  assign fifo_wr    = enable && ir.fifo_wr  && !ignored;
  assign start_tx   = enable && ir.start_tx && !ignored;
  assign fifo_wdata = src_data;
  assign fifo_eof   = ir.end_prog;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
    end else begin
      pc <= fetch;
      if (end_now)                        running <= 1'b0;
      else if (!running && start && enable) running <= 1'b1;
    end
endmodule
