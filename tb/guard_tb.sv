// guard_tb: end-to-end testbench of the return-address guard at its default
// parameters (16-entry RA stack, 64 spill blocks, 64-clock threshold).
//
// The testbench plays a processor running protected code behind its cache: it
// makes nested calls and returns in a random walk, each call preceded by
// push_guard and each return by guard_attention, with ordinary instruction and
// data misses in between, the bus running at half the guard clock (the
// 200 MHz guard on a 100 MHz bus of the scheme's test system) and main memory
// answering with random wait states.
// Some returns are attacked: the return jumps into the stack frame, jumps
// outside the function's epilogue, or goes unseen until after the time
// threshold. The testbench keeps its own copy of the call stack, decodes every
// instruction the guard supplies as an ARM branch and checks that it leads to
// the right return address, checks passed-on data against memory, the refused
// accesses to the spill area and, at the end, a call chain deep enough to fill
// the whole spill area. It counts each mechanism (push, pop, spill, restore,
// verified return, both attack kinds, violation, pass-through, spill area full)
// and fails if one never happened. It also checks that a command and a
// verified return are answered at the first bus clock edge after the request.
module guard_tb;
  import guard_pkg::*;

  localparam addr_t GUARD_BASE = 32'hFFFF_0000;
  localparam addr_t SPILL_BASE = 32'h0FFF_0000;
  localparam int unsigned DEPTH = 16, SPILL_BLOCKS = 64, TIMEOUT = 64;
  localparam addr_t PUSH_A   = GUARD_BASE + 32'h00;
  localparam addr_t PC_A     = GUARD_BASE + 32'h04;
  localparam addr_t FP_A     = GUARD_BASE + 32'h08;
  localparam addr_t STATUS_A = GUARD_BASE + 32'h0C;
  localparam addr_t POPRET_A = GUARD_BASE + 32'h10;
  localparam int STEPS = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  // bus clock = guard clock / BUS_DIV; bus_en marks the last guard clock of each bus clock
  localparam int unsigned BUS_DIV = 2;
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
  status_t status;
  guard_events_t events;
  logic attack_irq;

  guard dut (.*);

  mem_model #(.LATENCY(2), .STALL(1'b1), .WATCH_LO(SPILL_BASE),
              .WATCH_HI(SPILL_BASE + DEPTH * SPILL_BLOCKS * 4)) u_mem (
    .clk, .rst_n, .en(bus_en), .req_valid(dn_req_valid), .req_ready(dn_req_ready), .req(dn_req),
    .resp_valid(dn_resp_valid), .resp(dn_resp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_push, n_pop, n_spill, n_restore, n_ret, n_inv, n_tmo, n_viol, n_fwd;
  int exp_ret, exp_inv, exp_tmo, n_ovf;
  addr_t shadow [$];

  initial begin
    n_push = 0; n_pop = 0; n_spill = 0; n_restore = 0; n_ret = 0;
    n_inv = 0; n_tmo = 0; n_viol = 0; n_fwd = 0;
  end

  always @(posedge clk) if (rst_n) begin
    n_push    <= n_push    + int'(events.push);
    n_pop     <= n_pop     + int'(events.pop);
    n_spill   <= n_spill   + int'(events.spill);
    n_restore <= n_restore + int'(events.restore);
    n_ret     <= n_ret     + int'(events.return_ok);
    n_inv     <= n_inv     + int'(events.attack_invalid);
    n_tmo     <= n_tmo     + int'(events.attack_timeout);
    n_viol    <= n_viol    + int'(events.violation);
    n_fwd     <= n_fwd     + int'(events.forward);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // where an ARM B instruction at 'at' goes
  function automatic addr_t branch_target(addr_t at, data_t instr);
    logic [31:0] off;
    off = {{6{instr[23]}}, instr[23:0], 2'b00};
    return at + 32'd8 + off;
  endfunction

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

  task automatic miss(bit ifetch, addr_t a);
    data_t rd; bit e; int lat;
    xfer(1'b0, ifetch, a, '0, rd, e, lat);
    check(!e && rd == u_mem.peek(a), $sformatf("miss data at %h", a));
  endtask

  task automatic call_fn();
    data_t rd; bit e; int lat; int s0;
    addr_t ra;
    ra = 32'h0001_0000 + ($urandom_range(0, 32'hFFFF) << 2);
    s0 = n_spill;
    xfer(1'b1, 1'b0, PUSH_A, ra, rd, e, lat);
    if (shadow.size() < DEPTH * (SPILL_BLOCKS + 1)) begin
      // one clock, unless a stack refilled by a restore must be saved first
      check(!e && (n_spill != s0 || lat == BUS_DIV), $sformatf("push_guard (lat %0d)", lat));
      shadow.push_back(ra);
    end else begin
      check(e && status.ra_overflow, "push refused when spill area full");
      n_ovf++;
    end
    xfer(1'b0, 1'b0, PUSH_A, '0, rd, e, lat);
    check(!e && rd == POPRET_A, "pop_ret_addr read-back");
  endtask

  // kind: 0 normal, 1 into the stack frame, 2 outside the epilogue, 3 too late
  task automatic return_fn(int kind);
    data_t rd; bit e; int lat;
    addr_t pc, fp, at, expect_ra;
    pc = 32'h0002_0000 + ($urandom_range(0, 32'h3FFF) << 2);
    fp = 32'h0080_0000 + 32'(shadow.size()) * 32'h100;
    expect_ra = shadow.pop_back();
    xfer(1'b1, 1'b0, PC_A, pc, rd, e, lat);
    xfer(1'b1, 1'b0, FP_A, fp, rd, e, lat);
    check(!e && status.armed, "armed by guard_attention");
    if ($urandom_range(0, 1)) miss(1'b1, pc + 4);      // epilogue code
    if ($urandom_range(0, 1)) miss(1'b0, fp - 32'h8);  // register restore from frame
    unique case (kind)
      1: at = fp - 32'h40;
      2: at = 32'h0040_0000 + ($urandom_range(0, 32'hFFF) << 2);
      3: begin
        repeat (TIMEOUT + 4) @(posedge clk);
        at = pc + 8;
      end
      default: at = POPRET_A;
    endcase
    xfer(1'b0, 1'b1, at, '0, rd, e, lat);
    check(!e && rd[31:24] == 8'hEA, $sformatf("branch instruction supplied (%h)", rd));
    check(branch_target(at, rd) == expect_ra,
          $sformatf("return to %h, expected %h", branch_target(at, rd), expect_ra));
    if (kind == 0) begin
      check(lat == BUS_DIV, $sformatf("verification latency %0d", lat));
      exp_ret++;
    end else begin
      check(attack_irq, "attack raised");
      if (kind == 3) exp_tmo++; else exp_inv++;
      xfer(1'b1, 1'b0, STATUS_A, '0, rd, e, lat);
    end
    check(!status.armed, "disarmed after return");
  endtask

  initial begin
    data_t rd; bit e; int lat; int wr0;
    exp_ret = 0; exp_inv = 0; exp_tmo = 0; n_ovf = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // random program: nested calls and returns with cache misses in between
    for (int s = 0; s < STEPS; s++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 25) miss($urandom_range(0, 1), 32'h0001_0000 + ($urandom_range(0, 32'hFFFF) << 2));
      else if (r < 27) begin
        wr0 = u_mem.n_watch_wr;
        xfer(1'b1, 1'b0, SPILL_BASE + ($urandom_range(0, 1023) << 2), 32'hBAD, rd, e, lat);
        check(e && u_mem.n_watch_wr == wr0, "spill area write refused");
        xfer(1'b0, 1'b0, SPILL_BASE + ($urandom_range(0, 1023) << 2), '0, rd, e, lat);
        check(e && rd == 0, "spill area read refused");
      end
      else if (r < 64 && shadow.size() < 48) call_fn();
      else if (shadow.size() > 0) begin
        int k;
        k = $urandom_range(0, 99);
        return_fn(k < 85 ? 0 : k < 91 ? 1 : k < 96 ? 2 : 3);
      end
    end
    while (shadow.size() > 0) return_fn(0);

    // a call chain deep enough to fill the stack and the whole spill area
    for (int i = 0; i < DEPTH * (SPILL_BLOCKS + 1) + 2; i++) call_fn();
    check(status.spill_blocks == SPILL_BLOCKS && status.depth == DEPTH, "spill area full");
    while (shadow.size() > 0) return_fn(0);

    repeat (4) @(posedge clk);
    check(status.depth == 0 && status.spill_blocks == 0, "stack empty at the end");
    check(n_ret == exp_ret && n_inv == exp_inv && n_tmo == exp_tmo, "event counts");
    check(n_push == n_pop, "pushes match pops");
    $display("mechanisms: push=%0d pop=%0d spill=%0d restore=%0d return_ok=%0d invalid=%0d timeout=%0d violation=%0d forward=%0d overflow=%0d",
             n_push, n_pop, n_spill, n_restore, n_ret, n_inv, n_tmo, n_viol, n_fwd, n_ovf);
    check(n_push > 0, "push happened");
    check(n_pop > 0, "pop happened");
    check(n_spill > 0, "spill happened");
    check(n_restore > 0, "restore happened");
    check(n_ret > 0, "verified return happened");
    check(n_inv > 0, "invalid-fetch attack happened");
    check(n_tmo > 0, "timeout attack happened");
    check(n_viol > 0, "violation happened");
    check(n_fwd > 0, "pass-through happened");
    check(n_ovf > 0, "spill area full happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
