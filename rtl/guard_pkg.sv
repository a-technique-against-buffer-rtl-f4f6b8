// guard_pkg: types and constants shared by the return-address guard.
//
// The guard sits on the bus between a processor's cache and main memory. Both of
// its bus sides use the same simple split request/response protocol, carried by
// the two structs below:
//   * a request (bus_req_t) is offered with a valid bit and taken when the
//     receiver's ready bit is high in the same cycle;
//   * every request, write or read, is answered by exactly one response
//     (bus_resp_t) marked by a one-cycle valid bit; the requester always takes it;
//   * one transaction is outstanding at a time, so responses come in order.
// The protocol, the 32-bit widths and the ifetch side-band bit (instruction fetch
// versus data access, as most embedded buses carry) are this design's choices:
// the document only says that the processor is a 32-bit one and that the guard
// sits on the bus.
//
// The guard's command registers are memory mapped in a small window (the
// document's push_guard and guard_attention are memory-mapped instructions);
// the offsets below are this design's choice.
//
// The instruction the guard supplies for a return is an ARM "B" (branch, always)
// instruction, because the evaluation platform is ARM; the encoding is the
// architectural one: cond=1110, 101, L=0, signed 24-bit word offset taken
// relative to the fetch address plus 8.
package guard_pkg;

  localparam int unsigned AW = 32;  // address width (32-bit processor)
  localparam int unsigned DW = 32;  // data width

  typedef logic [AW-1:0] addr_t;
  typedef logic [DW-1:0] data_t;

  typedef struct packed {
    logic  write;   // 1: write, 0: read
    logic  ifetch;  // 1: instruction fetch (reads only)
    addr_t addr;    // byte address, word aligned
    data_t wdata;   // write data
  } bus_req_t;

  typedef struct packed {
    logic  err;     // access refused by the guard
    data_t rdata;   // read data (don't care for writes)
  } bus_resp_t;

  // Offsets inside the guard's register window.
  localparam logic [7:0] OFS_PUSH    = 8'h00;  // W: push_guard(RET_Addr); R: pop_ret_addr
  localparam logic [7:0] OFS_ATTN_PC = 8'h04;  // W: PC of the returning function
  localparam logic [7:0] OFS_ATTN_FP = 8'h08;  // W: FP, and starts guard_attention
  localparam logic [7:0] OFS_STATUS  = 8'h0C;  // R: status word; W: clear sticky flags
  localparam logic [7:0] OFS_POP_RET = 8'h10;  // pop_ret_addr (fetched, never written)

  // Status word layout.
  typedef struct packed {
    logic [11:0] spill_blocks;   // [31:20] RA stack blocks held in memory
    logic [7:0]  depth;          // [19:12] entries in the on-chip RA stack
    logic [5:0]  rsvd;           // [11:6]
    logic        underflow;      // [5] guard_attention with nothing to pop
    logic        ra_overflow;    // [4] push refused, spill area full
    logic        violation;      // [3] protected area accessed, or stray pop_ret_addr fetch
    logic        timeout_attack; // [2] return not seen within the time threshold
    logic        attack;         // [1] any attack detected
    logic        armed;          // [0] a return is being watched
  } status_t;

  // One-cycle event pulses, for performance counters or an interrupt controller.
  typedef struct packed {
    logic push;            // push_guard stored a return address
    logic pop;             // guard_attention took a return address off the stack
    logic spill;           // the full RA stack was saved into memory
    logic restore;         // a saved block of the RA stack was read back
    logic return_ok;       // pop_ret_addr fetched in time: branch supplied
    logic attack_invalid;  // invalid fetch during a return: branch supplied instead
    logic attack_timeout;  // fetch after the time threshold: branch supplied instead
    logic violation;       // protected area or stray pop_ret_addr access refused
    logic forward;         // ordinary access passed on to main memory
  } guard_events_t;

  // ARM B <target>, placed at address 'at'.
  function automatic data_t arm_branch(input addr_t at, input addr_t target);
    return {4'b1110, 4'b1010, 24'((target - (at + addr_t'(8))) >> 2)};
  endfunction

endpackage
