// mem_model: behavioural model of main memory for the guard's testbenches.
//
// Not synthesizable and not part of the design: it stands for the system's
// main memory behind the guard. It takes one request at a time on the same
// valid/ready bus the guard uses, with 'ready' dropped at random when STALL is
// set, and answers LATENCY bus clocks after taking the request (LATENCY >= 1).
// It runs on the guard's clock and acts only in cycles with 'en' high, the
// ends of bus clock periods, so its outputs hold for a whole bus clock.
// Storage is sparse; a word never written reads as init_word(addr), so a
// testbench can predict fetched data. Every access is counted, and accesses
// to the range [WATCH_LO, WATCH_HI) are counted separately.
module mem_model
  import guard_pkg::*;
#(
  parameter int unsigned LATENCY  = 2,
  parameter bit          STALL    = 1'b0,
  parameter addr_t       WATCH_LO = 32'h0FFF_0000,
  parameter addr_t       WATCH_HI = 32'h1000_0000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  logic      req_valid,
  output logic      req_ready,
  input  bus_req_t  req,
  output logic      resp_valid,
  output bus_resp_t resp
);

  data_t mem [addr_t];
  int    n_access;
  int    n_watch_wr;
  int    n_watch_rd;
  int    busy;

  function automatic data_t init_word(addr_t a);
    return a ^ 32'h5A5A_0000;
  endfunction

  function automatic data_t peek(addr_t a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  initial begin
    n_access   = 0;
    n_watch_wr = 0;
    n_watch_rd = 0;
    busy       = 0;
    req_ready  = 1'b0;
    resp_valid = 1'b0;
    resp       = '0;
  end

  always @(posedge clk) if (en || !rst_n) begin
    resp_valid <= 1'b0;
    if (!rst_n) begin
      busy      <= 0;
      req_ready <= 1'b0;
    end else if (busy > 0) begin
      if (busy == 1) begin
        resp_valid <= 1'b1;
        req_ready  <= STALL ? 1'($urandom_range(0, 1)) : 1'b1;
      end
      busy <= busy - 1;
    end else if (req_valid && req_ready) begin
      n_access <= n_access + 1;
      if (req.addr >= WATCH_LO && req.addr < WATCH_HI) begin
        if (req.write) n_watch_wr <= n_watch_wr + 1;
        else           n_watch_rd <= n_watch_rd + 1;
      end
      if (req.write) begin
        mem[req.addr] = req.wdata;
        resp.rdata   <= '0;
      end else begin
        resp.rdata   <= peek(req.addr);
      end
      resp.err  <= 1'b0;
      req_ready <= 1'b0;
      if (LATENCY <= 1) resp_valid <= 1'b1;
      busy <= int'(LATENCY) - 1;
      if (LATENCY <= 1) req_ready <= STALL ? 1'($urandom_range(0, 1)) : 1'b1;
    end else begin
      req_ready <= STALL ? 1'($urandom_range(0, 1)) : 1'b1;
    end
  end

endmodule
