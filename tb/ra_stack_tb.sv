// ra_stack_tb: self-checking testbench of the on-chip RA stack.
//
// Drives random pushes, pops and clears into a small stack and compares top,
// count, full, empty and the indexed read port with a queue kept by the
// testbench. Each operation is checked one clock after it is applied, the
// one-clock stack access the design promises. A watchdog ends the run.
module ra_stack_tb;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned W     = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0, clear = 1'b0;
  logic [W-1:0] push_data = '0;
  logic [$clog2(DEPTH)-1:0] rd_idx = '0;
  logic [W-1:0] rd_data, top;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic full, empty;

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  ra_stack #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #50 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (count=%0d model=%0d top=%h)", what, count, model.size(), top);
    end
  endtask

  task automatic compare();
    check(count == model.size(), "count");
    check(full == (model.size() == DEPTH), "full");
    check(empty == (model.size() == 0), "empty");
    if (model.size() > 0) check(top == model[$], "top");
    for (int i = 0; i < model.size(); i++) begin
      rd_idx = i[$clog2(DEPTH)-1:0];
      #1;
      check(rd_data == model[i], $sformatf("rd_data[%0d]", i));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 400; n++) begin
      int op;
      op = $urandom_range(0, 99);
      push = 1'b0; pop = 1'b0; clear = 1'b0;
      if (op < 55 && model.size() < DEPTH) begin
        push = 1'b1;
        push_data = $urandom();
      end else if (op < 97 && model.size() > 0) begin
        pop = 1'b1;
      end else if (op >= 97) begin
        clear = 1'b1;
      end
      @(posedge clk);
      #1;
      if (clear) model.delete();
      else if (push) model.push_back(push_data);
      else if (pop) void'(model.pop_back());
      push = 1'b0; pop = 1'b0; clear = 1'b0;
      @(negedge clk);
      compare();
    end
    // fill completely and drain, checking full and LIFO order
    while (model.size() < DEPTH) begin
      push = 1'b1; push_data = 32'hC0DE_0000 + model.size();
      @(posedge clk); #1; model.push_back(push_data); push = 1'b0;
    end
    @(negedge clk);
    compare();
    check(full, "full after fill");
    while (model.size() > 0) begin
      check(top == model[$], "drain order");
      pop = 1'b1;
      @(posedge clk); #1; void'(model.pop_back()); pop = 1'b0;
    end
    @(negedge clk);
    compare();
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
