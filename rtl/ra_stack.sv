// ra_stack: the guard's on-chip return-address stack.
//
// A last-in first-out store of DEPTH return addresses. A push writes the entry
// above the current top, a pop removes the top; both take effect at the clock
// edge, so one stack access costs one guard clock, as the document's timing
// model assumes for a stack access. The top entry is always visible on 'top'.
// For saving the whole stack into memory (the document's "Save RA stack into
// mem" step) every entry can be read by index, 0 being the oldest, and 'clear'
// empties the stack in one cycle; restoring is done by pushing the saved entries
// back oldest first. A push to a full stack and a pop from an empty one are
// ignored (the controller never issues them; assertions flag them).
//
// What follows the document: the stack holds return addresses, is on-chip in
// the guard, and has a "full" condition that triggers saving it into memory.
// This design's choices: the depth (16 by default; the document gives none),
// the indexed read port and the clear input.
//
// Interface: synchronous, active-low asynchronous reset 'rst_n' empties it.
module ra_stack #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               push_data,
  input  logic                       pop,
  input  logic                       clear,
  input  logic [$clog2(DEPTH)-1:0]   rd_idx,
  output logic [W-1:0]               rd_data,
  output logic [W-1:0]               top,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       empty
);

  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0] mem [DEPTH];
  logic [CW-1:0] cnt;

  assign count   = cnt;
  assign full    = (cnt == CW'(DEPTH));
  assign empty   = (cnt == '0);
  assign rd_data = mem[rd_idx];
  assign top     = empty ? '0 : mem[IW'(cnt - CW'(1))];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (clear) begin
      cnt <= '0;
    end else if (push && !full) begin
      cnt <= cnt + CW'(1);
    end else if (pop && !empty) begin
      cnt <= cnt - CW'(1);
    end
  end

  // Storage has no reset: an entry is only read after it has been pushed.
  always_ff @(posedge clk) begin
    if (!clear && push && !full) mem[IW'(cnt)] <= push_data;
  end

  a_no_push_pop: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !clear));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
