// Shared testbench helpers: check counting, clock and watchdog, and bus
// tasks for a module with a system-bus slave port named s_req / s_rsp.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH

`define TB_CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end

`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

`define TB_CLOCK_WATCHDOG(cycles) \
  initial begin clk = 0; forever #5 clk = ~clk; end \
  initial begin repeat (cycles) @(posedge clk); failures++; \
    $display("FAIL: watchdog expired"); `TB_FINISH end

// single-cycle slave accesses, driven on the falling edge
`define TB_SLAVE_TASKS \
  task automatic bw(input logic [11:0] a, input logic [15:0] d); \
    @(negedge clk); s_req.sel = 1; s_req.wr = 1; s_req.addr = a; s_req.wdata = d; \
    @(negedge clk); s_req.sel = 0; s_req.wr = 0; \
  endtask \
  task automatic br(input logic [11:0] a, output logic [15:0] d); \
    @(negedge clk); s_req.sel = 1; s_req.wr = 0; s_req.addr = a; #1; d = s_rsp.rdata; \
    @(negedge clk); s_req.sel = 0; \
  endtask

// APB accesses (setup + strobe), driven on the falling edge
`define TB_APB_TASKS \
  task automatic pw(input logic [7:0] a, input logic [7:0] d); \
    @(negedge clk); psel = 1; p_req.penable = 0; p_req.pwrite = 1; p_req.paddr = a; p_req.pwdata = d; \
    @(negedge clk); p_req.penable = 1; \
    @(negedge clk); psel = 0; p_req.penable = 0; p_req.pwrite = 0; \
  endtask \
  task automatic pr(input logic [7:0] a, output logic [7:0] d); \
    @(negedge clk); psel = 1; p_req.penable = 0; p_req.pwrite = 0; p_req.paddr = a; \
    @(negedge clk); p_req.penable = 1; #1; d = prdata; \
    @(negedge clk); psel = 0; p_req.penable = 0; \
  endtask

`endif
