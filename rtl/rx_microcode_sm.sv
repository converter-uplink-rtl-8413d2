// Microcode state machine of one receive data queue (A, B, C or D).
//
// Holds a 128 x 32-bit dual-ported microcode RAM whose second port belongs to the
// management processor. A 'start' pulse (128 clocks before the output cycle, once
// the shared DAC bus is granted) runs the program from instruction 0, one instruction
// per clock, up to the instruction with bit 31 (end of program) or entry 127.
//   bits 11..0  DAC address; an address with bit 11 set is ignored
//   bits 15..13 ignore the instruction on last / in-between / first cycles
//   bit 16      take one 32-bit word from the queue FIFO and write it to the address
// The FIFO word is popped in the clock the instruction executes and reaches the DAC
// bus two clocks later together with the instruction's address (the two-clock delay
// of the address field). A write from an empty FIFO sends zero. 'done' pulses with
// the last instruction. The instruction format, RAM size and delays are from the
// uplink description; pairing the write with its own instruction's address, the
// zero on an empty FIFO and staying inactive between programs are this design's
// reading of it.
module rx_microcode_sm
  import uplink_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        start,
  input  logic        first,
  input  logic        last,
  input  logic        cpu_we,
  input  logic [6:0]  cpu_idx,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  input  logic [31:0] fifo_rdata,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  output logic        dac_we,
  output logic [11:0] dac_addr,
  output logic [31:0] dac_data,
  output logic        busy,
  output logic        done
);
  logic [31:0] ucode [UC_DEPTH];
  logic [31:0] ir_raw;
  logic [6:0]  pc, fetch;
  logic        running, end_now, ignored, wr_now;
  rx_ucode_t   ir;
  logic [1:0]        we_d;
  logic [11:0]       addr_d [2];
  logic [31:0]       data_d;

  always_ff @(posedge clk) begin
    if (cpu_we) ucode[cpu_idx] <= cpu_wdata;
    cpu_rdata <= ucode[cpu_idx];
    ir_raw    <= ucode[fetch];
  end

  assign ir      = rx_ucode_t'(ir_raw);
  assign ignored = ucode_ignored(ir.ign_last, ir.ign_mid, ir.ign_first, first, last);
  assign end_now = running && (ir.end_prog || pc == 7'(UC_DEPTH - 1));
  assign done    = end_now;
  assign busy    = running;
  assign wr_now  = running && ir.dac_wr && !ignored;
  assign fifo_rd = wr_now;

  always_comb begin
    if (running && !end_now) fetch = pc + 1'b1;
    else                     fetch = 7'd0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      we_d    <= '0;
      addr_d  <= '{default: '0};
      data_d  <= '0;
      dac_data <= '0;
    end else begin
      pc <= fetch;
      if (end_now)                           running <= 1'b0;
      else if (!running && start && enable)  running <= 1'b1;
      we_d     <= {we_d[0], wr_now && !ir.addr[11]};
      addr_d   <= '{ir.addr, addr_d[0]};
      data_d   <= fifo_empty ? 32'h0 : fifo_rdata;
      dac_data <= data_d;
    end

  assign dac_we   = we_d[1];
  assign dac_addr = addr_d[1];
endmodule
