// line_memory: one TV field of predicted load current, replayed in the next
// field.
//
// Every T_s the re-sampled prediction is written to the next slot of a
// DEPTH-entry memory; `field_start` sends the slot pointer back to 0. In the
// same cycle as the write, the slot's old content, the prediction saved at
// the same point of the previous field, is read out (read-before-write), so
// the feed-forward controller receives in each switching period the load
// current that the previous field drew at that moment. Writes stop when the
// pointer reaches DEPTH; the number of slots written in the previous field is
// kept, and `ff_valid` marks only reads of slots that were written then (none
// in the first field after reset). A write in the cycle of `field_start`
// goes to slot 0 of the new field. A sample that finds all slots used is
// dropped and flagged on `overflow`.
//
// Interface: `wr` with `wdata` stores one sample (the prediction_sampler's
// iop_s_valid and iop_s). One cycle later `ff_data`/`ff_valid` hold the
// old slot content. `slot` is the pointer of the next write.
// Storing one field for use in the next is the document's; the
// read-before-write replay at the same slot, the slot count of the previous
// field and the DEPTH of 2048 (16.7 ms / 10 us = 1667 slots) are this
// design's choices.
module line_memory
  import lcp_pkg::*;
#(
  parameter int unsigned DEPTH = LINE_DEPTH_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     field_start,  // new TV field: slot 0
  input  logic                     wr,           // store wdata in the next slot
  input  io_t                      wdata,
  output io_t                      ff_data,      // same slot, previous field
  output logic                     ff_valid,
  output logic [$clog2(DEPTH+1)-1:0] slot,       // next slot to be written
  output logic                     overflow      // a sample found no slot
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = $clog2(DEPTH + 1);

  io_t           mem [DEPTH];
  logic [PW-1:0] prev_len;                  // slots written in previous field
  logic [PW-1:0] wptr;                      // slot written this cycle
  logic [PW-1:0] len;                       // slots of the previous field
  logic          full;

  // a write in the cycle of field_start goes to slot 0 of the new field
  assign wptr = field_start ? '0 : slot;
  assign len  = field_start ? slot : prev_len;
  assign full = (wptr == PW'(DEPTH));

  // memory array: read-before-write on a single port
  always_ff @(posedge clk) begin
    if (wr && !full) begin
      ff_data           <= mem[wptr[AW-1:0]];
      mem[wptr[AW-1:0]] <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot     <= '0;
      prev_len <= '0;
      ff_valid <= 1'b0;
      overflow <= 1'b0;
    end else begin
      ff_valid <= wr && !full && (wptr < len);
      overflow <= wr && full;
      if (field_start) prev_len <= slot;
      if (wr && !full) slot <= wptr + 1'b1;
      else             slot <= wptr;
    end
  end
endmodule
