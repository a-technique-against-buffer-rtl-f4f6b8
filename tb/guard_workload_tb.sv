// guard_workload_tb: the guard under the call rates of six embedded benchmarks.
//
// For each benchmark (bitcount, crc, dijkstra, fft, sha, stringsearch) the
// testbench plays a processor that runs for RUN_CLOCKS guard clocks and makes
// function calls at the benchmark's measured rate: 0.7, 3.0, 0.12, 1.0, 0.6
// and 0.5 calls per 100 processor clocks, with the processor clocked at twice
// the guard's rate (400 against 200 MHz), i.e. per 50 guard clocks, and the
// bus at half the guard's rate (100 MHz). Calls and
// returns follow a random walk of nesting depth up to 40, so the RA stack is
// saved and restored now and then. Between calls the processor runs from its
// cache; one access in MISS_PER clocks misses and goes through the guard. All
// returns are benign. Every call is preceded by push_guard and every return by
// guard_attention, and every return is checked to branch to the right address.
// Every command not delayed by a save or restore must be answered at the next
// bus clock edge. The testbench reports, per benchmark, the clocks the
// processor spends waiting on guard commands, and separately on saving and
// restoring the stack, as shares of the run. The
// benchmark rates are measured figures from the scheme's evaluation; the miss
// rate, nesting walk and run length are this testbench's choices.
module guard_workload_tb;
  import guard_pkg::*;

  localparam addr_t GUARD_BASE = 32'hFFFF_0000;
  localparam addr_t PUSH_A   = GUARD_BASE + 32'h00;
  localparam addr_t PC_A     = GUARD_BASE + 32'h04;
  localparam addr_t FP_A     = GUARD_BASE + 32'h08;
  localparam addr_t POPRET_A = GUARD_BASE + 32'h10;
  localparam int RUN_CLOCKS = 40000;
  localparam int MISS_PER   = 100;
  localparam int MAX_NEST   = 40;

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

  mem_model #(.LATENCY(2), .STALL(1'b0)) u_mem (
    .clk, .rst_n, .en(bus_en), .req_valid(dn_req_valid), .req_ready(dn_req_ready), .req(dn_req),
    .resp_valid(dn_resp_valid), .resp(dn_resp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_spill = 0, n_restore = 0;
  longint clk_count = 0;
  addr_t shadow [$];

  always @(posedge clk) begin
    clk_count <= clk_count + 1;
    if (rst_n) begin
      n_spill   <= n_spill + int'(events.spill);
      n_restore <= n_restore + int'(events.restore);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic addr_t branch_target(addr_t at, data_t instr);
    logic [31:0] off;
    off = {{6{instr[23]}}, instr[23:0], 2'b00};
    return at + 32'd8 + off;
  endfunction

  // one transaction; wait = clocks from offering it to its response
  task automatic xfer(input bit wr, input bit ifetch, input addr_t a, input data_t wd,
                      output data_t rd, output bit err, output int lat, output int wait_clk);
    @(negedge clk);
    up_req_valid = 1'b1;
    up_req = '{write: wr, ifetch: ifetch, addr: a, wdata: wd};
    wait_clk = 0;
    while (!(up_req_ready && bus_en)) begin
      @(negedge clk);
      wait_clk++;
    end
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
    wait_clk += lat;
    rd  = up_resp.rdata;
    err = up_resp.err;
  endtask

  // a guard command; counts its wait and checks the one-clock answer
  task automatic cmd(input bit wr, input bit ifetch, input addr_t a, input data_t wd,
                     output data_t rd, inout longint stall, inout longint stall_sr);
    bit e; int lat, w; int s0, r0;
    s0 = n_spill; r0 = n_restore;
    xfer(wr, ifetch, a, wd, rd, e, lat, w);
    if (n_spill != s0 || n_restore != r0) stall_sr += longint'(w);
    else                                  stall    += longint'(w);
    check(!e, $sformatf("command at %h accepted", a));
    check(lat == BUS_DIV || n_spill != s0 || n_restore != r0, $sformatf("command latency %0d", lat));
  endtask

  task automatic run_bench(string name, real calls_per_100_cpu);
    longint t0, stall, stall_sr, n_call, n_ret, n_miss;
    data_t rd; bit e; int lat, w;
    real p_call, p_miss;
    int s0, r0;
    t0 = clk_count; stall = 0; stall_sr = 0; n_call = 0; n_ret = 0; n_miss = 0;
    s0 = n_spill; r0 = n_restore;
    // processor clock = 2 guard clocks; a call and its return are two events
    p_call = 2.0 * calls_per_100_cpu / 50.0;
    p_miss = 1.0 / MISS_PER;
    while (clk_count - t0 < longint'(RUN_CLOCKS)) begin
      real u;
      u = real'($urandom_range(0, 999999)) / 1.0e6;
      if (u < p_call) begin
        bit do_call;
        do_call = (shadow.size() == 0) ||
                  (shadow.size() < MAX_NEST && $urandom_range(0, 1) != 0);
        if (do_call) begin
          addr_t ra;
          ra = 32'h0001_0000 + ($urandom_range(0, 32'hFFFF) << 2);
          cmd(1'b1, 1'b0, PUSH_A, ra, rd, stall, stall_sr);
          cmd(1'b0, 1'b0, PUSH_A, '0, rd, stall, stall_sr);
          check(rd == POPRET_A, "pop_ret_addr read-back");
          shadow.push_back(ra);
          n_call++;
        end else begin
          addr_t pc, expect_ra;
          pc = 32'h0002_0000 + ($urandom_range(0, 32'h3FFF) << 2);
          expect_ra = shadow.pop_back();
          cmd(1'b1, 1'b0, PC_A, pc, rd, stall, stall_sr);
          cmd(1'b1, 1'b0, FP_A, 32'h0080_0000 + 32'(shadow.size()) * 32'h100, rd, stall, stall_sr);
          cmd(1'b0, 1'b1, POPRET_A, '0, rd, stall, stall_sr);
          check(branch_target(POPRET_A, rd) == expect_ra, "benign return goes to RET_Addr");
          n_ret++;
        end
      end else if (u < p_call + p_miss) begin
        addr_t a;
        a = 32'h0001_0000 + ($urandom_range(0, 32'hFFFF) << 2);
        xfer(1'b0, 1'($urandom_range(0, 1)), a, '0, rd, e, lat, w);
        check(!e && rd == u_mem.peek(a), "miss passed on");
        n_miss++;
      end else begin
        @(posedge clk);
      end
    end
    check(!status.attack && !status.violation, $sformatf("%s: no false alarm", name));
    check(n_call > 0 && n_ret > 0, $sformatf("%s: calls made", name));
    $display("%-13s calls=%0d returns=%0d misses=%0d spills=%0d restores=%0d of %0d clocks: command wait %0.2f%%, wait on save/restore %0.2f%%",
             name, n_call, n_ret, n_miss, n_spill - s0, n_restore - r0, clk_count - t0,
             100.0 * real'(stall) / real'(clk_count - t0),
             100.0 * real'(stall_sr) / real'(clk_count - t0));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_bench("bitcount",     0.7);
    run_bench("crc",          3.0);
    run_bench("dijkstra",     0.12);
    run_bench("fft",          1.0);
    run_bench("sha",          0.6);
    run_bench("stringsearch", 0.5);
    check(n_spill > 0 && n_restore > 0, "stack saved and restored at least once");
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
