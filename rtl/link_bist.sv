// link_bist: built-in self-test of the physical links of one router.
//
// Before any router or core is tested, every link is checked by BIST logic in
// the routers, so that test packets are later sent only over links known to be
// fault-free. The sending side drives a fixed sequence of 2*W+2 patterns onto
// its outgoing links, one per cycle: all zeros, all ones, a walking one and a
// walking zero. They expose every wire stuck at 0 or 1 and every short between
// two wires (either wired-AND or wired-OR). The receiving side regenerates the
// same sequence for each incoming link and compares it, pattern by pattern, with
// what arrives; a link whose patterns differ, or do not all arrive within
// TIMEOUT cycles of start (an open link), is marked faulty in fault[].
// Ports with port_en = 0 (the missing neighbours of an edge router) are not
// checked.
//
// The document says only that links are tested by BIST inserted in the
// routers; the pattern set, the timeout and this interface are this design's
// choices. Timing: patterns leave in cycles 1..2W+2 after start; done rises
// when all enabled ports have received every pattern or at TIMEOUT.
module link_bist #(
  parameter int NP      = 4,
  parameter int W       = 32,
  parameter int TIMEOUT = 4 * W + 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NP-1:0]        port_en,
  output logic                 tx_valid,
  output logic [W-1:0]         tx_data,
  input  logic [NP-1:0]        rx_valid,
  input  logic [NP-1:0][W-1:0] rx_data,
  output logic                 busy,
  output logic                 done,
  output logic [NP-1:0]        fault
);
  localparam int NPAT = 2 * W + 2;
  localparam int CW   = $clog2(NPAT + 1);
  localparam int TW   = $clog2(TIMEOUT + 1);

  function automatic logic [W-1:0] pattern(input logic [CW-1:0] k);
    logic [W-1:0] one;
    if (k == 0) return '0;
    if (k == 1) return '1;
    if (k < CW'(W + 2)) begin
      one = W'(1) << (k - CW'(2));
      return one;
    end
    one = W'(1) << (k - CW'(W + 2));
    return ~one;
  endfunction

  logic [CW-1:0]          tcnt;
  logic [NP-1:0][CW-1:0]  rcnt;
  logic [TW-1:0]          timer;
  logic                   all_in;

  assign tx_valid = busy && (tcnt != CW'(NPAT));
  assign tx_data  = pattern(tcnt);

  always_comb begin
    all_in = 1'b1;
    for (int q = 0; q < NP; q++)
      if (port_en[q] && rcnt[q] != CW'(NPAT)) all_in = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      fault <= '0;
      tcnt  <= '0;
      rcnt  <= '0;
      timer <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      done  <= 1'b0;
      fault <= '0;
      tcnt  <= '0;
      rcnt  <= '0;
      timer <= '0;
    end else if (busy) begin
      if (tx_valid) tcnt <= tcnt + 1'b1;
      timer <= timer + 1'b1;
      for (int q = 0; q < NP; q++) begin
        if (port_en[q] && rx_valid[q] && rcnt[q] != CW'(NPAT)) begin
          rcnt[q] <= rcnt[q] + 1'b1;
          if (rx_data[q] != pattern(rcnt[q])) fault[q] <= 1'b1;
        end
      end
      if (all_in && tcnt == CW'(NPAT)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else if (timer == TW'(TIMEOUT)) begin
        busy <= 1'b0;
        done <= 1'b1;
        for (int q = 0; q < NP; q++)
          if (port_en[q] && rcnt[q] != CW'(NPAT)) fault[q] <= 1'b1;
      end
    end
  end

endmodule
