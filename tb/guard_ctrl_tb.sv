// guard_ctrl_tb: directed, self-checking testbench of the guard's control logic.
//
// The controller is connected to an RA stack and to the behavioural memory, and
// the testbench plays the processor and its cache. It runs one scenario for each
// behaviour: pass-through of ordinary accesses, the pop_ret_addr read-back,
// push_guard, guard_attention and a correct return, an attack by a fetch from
// the stack frame, an attack by a fetch outside the epilogue, an attack found by
// the timeout, saving the full stack into memory and restoring it, a call onto
// a stack a restore has just refilled, the spill area running full, refused accesses to the spill area, a stray pop_ret_addr
// fetch and a return with nothing saved. It checks data, error bits, status
// flags, the memory's contents and the latencies: one guard clock for a stack
// command and for a verified return, one extra clock for a passed-on access.
// Small parameters (stack depth 4, two spill blocks, 8-clock threshold) keep
// the run short.
module guard_ctrl_tb;
  import guard_pkg::*;

  localparam int unsigned DEPTH        = 4;
  localparam int unsigned SPILL_BLOCKS = 2;
  localparam int unsigned TIMEOUT      = 8;
  localparam addr_t       GUARD_BASE   = 32'hFFFF_0000;
  localparam addr_t       SPILL_BASE   = 32'h0FFF_0000;
  localparam int unsigned MEM_LAT      = 3;

  localparam addr_t PUSH_A   = GUARD_BASE + 32'h00;
  localparam addr_t PC_A     = GUARD_BASE + 32'h04;
  localparam addr_t FP_A     = GUARD_BASE + 32'h08;
  localparam addr_t STATUS_A = GUARD_BASE + 32'h0C;
  localparam addr_t POPRET_A = GUARD_BASE + 32'h10;

  logic clk = 1'b0, rst_n = 1'b0;
  // bus clock = guard clock / BUS_DIV; bus_en marks the last guard clock of each bus clock
  localparam int unsigned BUS_DIV = 1;
  int unsigned div_cnt = 0;
  logic bus_en;
  always @(posedge clk) div_cnt <= (div_cnt + 1) % BUS_DIV;
  assign bus_en = (div_cnt == BUS_DIV - 1);
  logic up_req_valid = 1'b0, up_req_ready, up_resp_valid;
  bus_req_t up_req = '0;
  bus_resp_t up_resp;
  logic dn_req_valid, dn_req_ready, dn_resp_valid;
  bus_req_t dn_req;
  bus_resp_t dn_resp;
  logic st_push, st_pop, st_clear, st_full, st_empty;
  addr_t st_push_data, st_rd_data, st_top;
  logic [$clog2(DEPTH)-1:0] st_rd_idx;
  logic [$clog2(DEPTH+1)-1:0] st_count;
  status_t status;
  guard_events_t events;
  logic attack_irq;

  int checks = 0, failures = 0;

  guard_ctrl #(.DEPTH(DEPTH), .GUARD_BASE(GUARD_BASE), .SPILL_BASE(SPILL_BASE),
               .SPILL_BLOCKS(SPILL_BLOCKS), .TIMEOUT(TIMEOUT)) dut (.*);

  ra_stack #(.DEPTH(DEPTH), .W(32)) u_stack (
    .clk, .rst_n, .push(st_push), .push_data(st_push_data), .pop(st_pop),
    .clear(st_clear), .rd_idx(st_rd_idx), .rd_data(st_rd_data), .top(st_top),
    .count(st_count), .full(st_full), .empty(st_empty));

  mem_model #(.LATENCY(MEM_LAT), .STALL(1'b0), .WATCH_LO(SPILL_BASE),
              .WATCH_HI(SPILL_BASE + DEPTH * SPILL_BLOCKS * 4)) u_mem (
    .clk, .rst_n, .en(bus_en), .req_valid(dn_req_valid), .req_ready(dn_req_ready), .req(dn_req),
    .resp_valid(dn_resp_valid), .resp(dn_resp));

  always #5 clk = ~clk;

  // independent reference for the ARM branch the guard must supply
  function automatic data_t ref_branch(addr_t at, addr_t target);
    logic [31:0] off;
    off = (target - at - 32'd8) >> 2;
    return 32'hEA00_0000 | (off & 32'h00FF_FFFF);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One bus transaction from the cache side; lat = clocks from acceptance to response.
  task automatic xfer(input bit wr, input bit ifetch, input addr_t a, input data_t wd,
                      output data_t rd, output bit err, output int lat);
    @(negedge clk);
    up_req_valid = 1'b1;
    up_req = '{write: wr, ifetch: ifetch, addr: a, wdata: wd};
    while (!(up_req_ready && bus_en)) @(negedge clk);
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    up_req_valid = 1'b0;
    up_req = '0;
    forever begin
      lat++;
      if (up_resp_valid && bus_en) break;
      @(negedge clk);
    end
    rd  = up_resp.rdata;
    err = up_resp.err;
  endtask

  task automatic wr(addr_t a, data_t d, output bit err, output int lat);
    data_t rd;
    xfer(1'b1, 1'b0, a, d, rd, err, lat);
  endtask

  task automatic push_guard(addr_t ra);
    bit e; int lat;
    wr(PUSH_A, ra, e, lat);
    check(!e, "push accepted");
  endtask

  task automatic attention(addr_t pc, addr_t fp);
    bit e; int lat;
    wr(PC_A, pc, e, lat);
    check(!e, "attn pc");
    wr(FP_A, fp, e, lat);
    check(!e, "attn fp");
  endtask

  task automatic ret_ok(addr_t expect_ra);
    data_t rd; bit e; int lat;
    xfer(1'b0, 1'b1, POPRET_A, '0, rd, e, lat);
    check(!e && rd == ref_branch(POPRET_A, expect_ra),
          $sformatf("return branch to %h (got %h)", expect_ra, rd));
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (!up_req_ready) @(negedge clk);
  endtask

  initial begin
    data_t rd; bit e; int lat;
    int acc0;
    status_t st;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. pass-through read and write, latency 1 + memory latency
    xfer(1'b0, 1'b1, 32'h0000_1000, '0, rd, e, lat);
    check(!e && rd == (32'h0000_1000 ^ 32'h5A5A_0000), "forwarded fetch data");
    check(lat == 1 + MEM_LAT, $sformatf("forward latency %0d", lat));
    xfer(1'b1, 1'b0, 32'h0000_2000, 32'h1234_5678, rd, e, lat);
    check(!e && u_mem.peek(32'h0000_2000) == 32'h1234_5678, "forwarded write");
    xfer(1'b0, 1'b0, 32'h0000_2000, '0, rd, e, lat);
    check(rd == 32'h1234_5678, "forwarded read back");

    // 2. reading the PUSH register gives pop_ret_addr, in one clock
    xfer(1'b0, 1'b0, PUSH_A, '0, rd, e, lat);
    check(!e && rd == POPRET_A && lat == 1, "pop_ret_addr read-back");

    // 3. push_guard: one clock, stack depth 1
    wr(PUSH_A, 32'h0000_4444, e, lat);
    check(!e && lat == 1, $sformatf("push latency %0d", lat));
    xfer(1'b0, 1'b0, STATUS_A, '0, rd, e, lat);
    st = status_t'(rd);
    check(st.depth == 1 && !st.armed, "status after push");

    // 4. guard_attention then a correct return through the epilogue
    attention(32'h0000_3000, 32'h8000_0100);
    check(status.armed && status.depth == 0, "armed after attention");
    xfer(1'b0, 1'b1, 32'h0000_3004, '0, rd, e, lat);       // epilogue fetch
    check(!e && rd == (32'h0000_3004 ^ 32'h5A5A_0000), "epilogue fetch passed on");
    xfer(1'b0, 1'b0, 32'h8000_00F8, '0, rd, e, lat);       // load from the frame
    check(!e && rd == (32'h8000_00F8 ^ 32'h5A5A_0000), "frame data load passed on");
    xfer(1'b0, 1'b1, POPRET_A, '0, rd, e, lat);
    check(!e && rd == ref_branch(POPRET_A, 32'h0000_4444), "branch to RET_Addr");
    check(lat == 1, $sformatf("verify latency %0d", lat));
    check(!status.armed && !status.attack, "disarmed, no attack");

    // 5. attack: the return lands in the stack frame (injected code)
    push_guard(32'h0000_5550);
    attention(32'h0000_3000, 32'h8000_0100);
    acc0 = u_mem.n_access;
    xfer(1'b0, 1'b1, 32'h8000_0080, '0, rd, e, lat);
    check(rd == ref_branch(32'h8000_0080, 32'h0000_5550), "stack fetch redirected");
    check(u_mem.n_access == acc0, "stack fetch not passed to memory");
    check(status.attack && !status.timeout_attack && attack_irq, "attack flagged");
    wr(STATUS_A, '0, e, lat);
    check(!status.attack && !attack_irq, "flags cleared");

    // 6. attack: the return lands outside the epilogue (code reuse)
    push_guard(32'h0000_6660);
    attention(32'h0000_3000, 32'h8000_0100);
    xfer(1'b0, 1'b1, 32'h0000_7000, '0, rd, e, lat);
    check(rd == ref_branch(32'h0000_7000, 32'h0000_6660), "outside fetch redirected");
    check(status.attack, "attack flagged (outside)");
    wr(STATUS_A, '0, e, lat);

    // 7. attack found by the time threshold: a valid-looking fetch comes too late
    push_guard(32'h0000_7770);
    attention(32'h0000_3000, 32'h8000_0100);
    repeat (TIMEOUT + 2) @(posedge clk);
    xfer(1'b0, 1'b1, 32'h0000_3008, '0, rd, e, lat);
    check(rd == ref_branch(32'h0000_3008, 32'h0000_7770), "late fetch redirected");
    check(status.attack && status.timeout_attack, "timeout flagged");
    wr(STATUS_A, '0, e, lat);

    // 8. filling the stack saves it into the spill area and empties it
    for (int i = 0; i < DEPTH; i++) push_guard(32'h0001_0000 + 32'(i) * 4);
    wait_idle();
    check(status.depth == 0 && status.spill_blocks == 1, "stack saved");
    for (int i = 0; i < DEPTH; i++)
      check(u_mem.peek(SPILL_BASE + 32'(i) * 4) == 32'h0001_0000 + 32'(i) * 4,
            $sformatf("spill word %0d", i));
    push_guard(32'h0002_0000);
    // return from the newest; the return that empties the stack reads the
    // saved block back
    acc0 = u_mem.n_watch_rd;
    attention(32'h0000_3000, 32'h8000_0100);
    ret_ok(32'h0002_0000);
    wait_idle();
    check(status.depth == DEPTH && status.spill_blocks == 0, "restored after return");
    check(u_mem.n_watch_rd == acc0 + DEPTH, "restore read the block");
    // a call onto the refilled stack saves it again before pushing
    push_guard(32'h0002_1000);
    wait_idle();
    check(status.depth == 1 && status.spill_blocks == 1, "saved again, then pushed");
    attention(32'h0000_3000, 32'h8000_0100);
    ret_ok(32'h0002_1000);
    wait_idle();
    check(status.depth == DEPTH && status.spill_blocks == 0, "restored again");
    attention(32'h0000_3000, 32'h8000_0100);
    ret_ok(32'h0001_0000 + (DEPTH - 1) * 4);
    for (int i = DEPTH - 2; i >= 0; i--) begin
      attention(32'h0000_3000, 32'h8000_0100);
      ret_ok(32'h0001_0000 + 32'(i) * 4);
    end
    wait_idle();
    check(status.depth == 0 && status.spill_blocks == 0 && !status.attack, "all returned");

    // 9. spill area full: the push after the last slot is refused
    for (int i = 0; i < DEPTH * (SPILL_BLOCKS + 1); i++) push_guard(32'h0003_0000 + 32'(i) * 4);
    wait_idle();
    check(status.depth == DEPTH && status.spill_blocks == SPILL_BLOCKS, "stack and spill area full");
    wr(PUSH_A, 32'hDEAD_0000, e, lat);
    check(e && status.ra_overflow, "push refused when spill area full");
    for (int i = DEPTH * (SPILL_BLOCKS + 1) - 1; i >= 0; i--) begin
      attention(32'h0000_3000, 32'h8000_0100);
      ret_ok(32'h0003_0000 + 32'(i) * 4);
    end
    wait_idle();
    check(status.depth == 0 && status.spill_blocks == 0, "deep nest unwound");
    wr(STATUS_A, '0, e, lat);

    // 10. the spill area is closed to the processor
    acc0 = u_mem.n_watch_wr;
    xfer(1'b1, 1'b0, SPILL_BASE + 32'h4, 32'hBAD0_BAD0, rd, e, lat);
    check(e && u_mem.n_watch_wr == acc0, "spill write refused");
    xfer(1'b0, 1'b0, SPILL_BASE, '0, rd, e, lat);
    check(e && rd == '0 && status.violation, "spill read refused");
    wr(STATUS_A, '0, e, lat);

    // 11. pop_ret_addr fetched without guard_attention
    xfer(1'b0, 1'b1, POPRET_A, '0, rd, e, lat);
    check(e && status.violation, "stray pop_ret_addr fetch refused");

    // 12. guard_attention with nothing saved
    wr(PC_A, 32'h3000, e, lat);
    wr(FP_A, 32'h8000_0100, e, lat);
    check(e && status.underflow && !status.armed, "underflow reported");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
