// guard: return-address guard placed between a processor's cache and main memory.
//
// A stack-smashing attack overwrites the return address saved in a function's
// stack frame so that the return jumps into the attacker's code. This module
// keeps its own copy of every return address, out of the processor's reach, and
// makes the processor return through it: software stores the return address in
// the guard before each call (push_guard), saves a special non-cacheable address
// (pop_ret_addr) as the return address instead, and tells the guard before each
// return (guard_attention). The return then fetches its next instruction from
// pop_ret_addr; that fetch misses the cache and reaches the guard, which answers
// with "branch to the saved return address". If the return goes elsewhere, the
// guard recognises the diverted instruction fetch (or the missing fetch, by a
// timeout) and answers that fetch with the same branch. The processor core is
// not changed; the guard only needs to see the cache's miss and non-cacheable
// traffic, which it otherwise passes on to memory unchanged.
//
// Structure: ra_stack (the on-chip RA stack) and guard_ctrl (the control
// logic), as the document's block diagram shows. When the RA stack fills, the
// controller saves it into a spill area of main memory that the processor may
// not access, and reads it back when the on-chip stack runs empty.
//
// Interface: the cache-side port (up_*) is a target and the memory-side port
// (dn_*) an initiator of the same valid/ready request, one-response-per-request
// bus (see guard_pkg); one transaction at a time. The logic runs on the guard
// clock; the bus runs on a synchronous clock N times slower, marked by
// 'bus_en', high in the last guard clock of each bus clock (tie it high for
// N = 1). The scheme's own figures are a 200 MHz guard on a 100 MHz bus, N = 2.
// Active-low asynchronous reset. The parameters set the stack depth, the
// address of the guard's register window (which must be mapped non-cacheable),
// the spill area, the time threshold in guard clocks and the two windows used
// to judge an instruction fetch during a return (see guard_ctrl). The depth,
// addresses, windows and threshold are this design's defaults; the document
// gives no values for them.
module guard
  import guard_pkg::*;
#(
  parameter int unsigned DEPTH        = 16,
  parameter addr_t       GUARD_BASE   = 32'hFFFF_0000,
  parameter addr_t       SPILL_BASE   = 32'h0FFF_0000,
  parameter int unsigned SPILL_BLOCKS = 64,
  parameter int unsigned TIMEOUT      = 64,
  parameter addr_t       FRAME_WIN    = 32'h0000_0400,
  parameter addr_t       EPI_WIN      = 32'h0000_0040
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bus_en,
  input  logic          up_req_valid,
  output logic          up_req_ready,
  input  bus_req_t      up_req,
  output logic          up_resp_valid,
  output bus_resp_t     up_resp,
  output logic          dn_req_valid,
  input  logic          dn_req_ready,
  output bus_req_t      dn_req,
  input  logic          dn_resp_valid,
  input  bus_resp_t     dn_resp,
  output status_t       status,
  output guard_events_t events,
  output logic          attack_irq
);

  logic                       st_push, st_pop, st_clear, st_full, st_empty;
  addr_t                      st_push_data, st_rd_data, st_top;
  logic [$clog2(DEPTH)-1:0]   st_rd_idx;
  logic [$clog2(DEPTH+1)-1:0] st_count;

  ra_stack #(.DEPTH(DEPTH), .W(AW)) u_stack (
    .clk, .rst_n,
    .push(st_push), .push_data(st_push_data), .pop(st_pop), .clear(st_clear),
    .rd_idx(st_rd_idx), .rd_data(st_rd_data), .top(st_top),
    .count(st_count), .full(st_full), .empty(st_empty)
  );

  guard_ctrl #(
    .DEPTH(DEPTH), .GUARD_BASE(GUARD_BASE), .SPILL_BASE(SPILL_BASE),
    .SPILL_BLOCKS(SPILL_BLOCKS), .TIMEOUT(TIMEOUT),
    .FRAME_WIN(FRAME_WIN), .EPI_WIN(EPI_WIN)
  ) u_ctrl (
    .clk, .rst_n, .bus_en,
    .up_req_valid, .up_req_ready, .up_req, .up_resp_valid, .up_resp,
    .dn_req_valid, .dn_req_ready, .dn_req, .dn_resp_valid, .dn_resp,
    .st_push, .st_push_data, .st_pop, .st_clear, .st_rd_idx, .st_rd_data,
    .st_top, .st_count, .st_full, .st_empty,
    .status, .events, .attack_irq
  );

endmodule
