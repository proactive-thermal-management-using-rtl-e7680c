// main_mem_model: behavioural model of the 256 MB main memory (testbench only, not synthesizable).
//
// Line-wide, blocking: req_ready is high when idle; a request is answered with resp_valid exactly
// LAT cycles after it is accepted (a write is acknowledged the same way). The two LUT regions
// read as the precomputed add and multiply results (tb_pkg::tb_lut_line); any other line reads back
// what was last written to it, or, if never written, a pattern derived from its address
// (tb_pkg::tb_fill_line). reads and writes count the requests served.
module main_mem_model
  import pmbc_pkg::*;
  import tb_pkg::*;
#(
  parameter int LAT = 100                 // 200 ns at 500 MHz
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic              req_we,
  input  logic [LINE_W-1:0] req_wline,
  output logic              resp_valid,
  output logic [LINE_W-1:0] resp_line,
  output int                reads,
  output int                writes
);

  logic [LINE_W-1:0] store [logic [ADDR_W-1:0]];
  int                cnt;
  logic              busy;
  logic [ADDR_W-1:0] addr_q;

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= 0;
      resp_valid <= 1'b0;
      resp_line  <= '0;
      reads      <= 0;
      writes     <= 0;
      addr_q     <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy) begin
        if (req_valid) begin
          logic [ADDR_W-1:0] la;
          la = {req_addr[ADDR_W-1:OFFS_W], {OFFS_W{1'b0}}};
          busy   <= 1'b1;
          cnt    <= LAT - 1;
          addr_q <= la;
          if (req_we) begin
            store[la] = req_wline;
            writes   <= writes + 1;
          end else begin
            reads    <= reads + 1;
          end
        end
      end else if (cnt > 1) begin
        cnt <= cnt - 1;
      end else begin
        busy       <= 1'b0;
        resp_valid <= 1'b1;
        if (addr_q >= MUL_LUT_BASE)       resp_line <= tb_lut_line(addr_q);
        else if (store.exists(addr_q))    resp_line <= store[addr_q];
        else                              resp_line <= tb_fill_line(addr_q);
      end
    end
  end

endmodule
