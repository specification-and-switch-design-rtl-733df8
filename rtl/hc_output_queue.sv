// hc_output_queue: the queue in front of one outgoing channel.
//
// Holds up to W packets waiting for the channel. All NWR channel circuits of
// the switch can write in the same cycle (several packets may pick the same
// outgoing channel at once); writes are granted in port order while free
// slots remain, and a refused packet stays in its input buffer. The free
// count is taken from the occupancy at the start of the cycle, so a grant
// never depends on the downstream channel's ready, which keeps the network
// free of combinational loops through the links.
//
// One packet leaves per cycle on a valid/ready handshake. With OOO = 0 the
// queue is first-come first-served. With OOO = 1 the oldest entry whose
// priority bit is set (a packet still in its first routing phase) leaves
// first, else the oldest entry, which is the out-of-order discipline of the
// document's OOO routing schemes. Entries are kept oldest first in a
// shifting array; the leaving entry is squeezed out and new ones appended.
module hc_output_queue #(
  parameter int PKT_W = 21,
  parameter int W     = 8,
  parameter int NWR   = 5,
  parameter bit OOO   = 1'b0,
  localparam int CW   = $clog2(W + 1),
  localparam int SW   = (W > 1) ? $clog2(W) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NWR-1:0]             wr_valid,
  input  logic [NWR-1:0][PKT_W-1:0]  wr_data,
  input  logic [NWR-1:0]             wr_prio,
  output logic [NWR-1:0]             wr_grant,
  output logic                       rd_valid,
  output logic [PKT_W-1:0]           rd_data,
  output logic                       rd_prio,
  input  logic                       rd_ready,
  output logic [CW-1:0]              count,
  output logic                       reordered   // head-of-line passed over this cycle
);
  logic [W-1:0][PKT_W-1:0] mem, mem_n;
  logic [W-1:0]            pri, pri_n;
  logic [CW-1:0]           count_n;
  logic [SW-1:0]           sel;
  logic                    pop;

  // Which entry leaves.
  always_comb begin
    sel = '0;
    if (OOO) begin
      for (int i = W - 1; i >= 0; i--)
        if (i < int'(count) && pri[i]) sel = SW'(i);
    end
    rd_valid  = (count != '0);
    rd_data   = mem[sel];
    rd_prio   = pri[sel];
    pop       = rd_valid && rd_ready;
    reordered = pop && (sel != '0);
  end

  // Write grants: in port order while the queue has room.
  always_comb begin
    int granted;
    granted  = 0;
    wr_grant = '0;
    for (int p = 0; p < NWR; p++) begin
      if (wr_valid[p] && (granted + int'(count) < W)) begin
        wr_grant[p] = 1'b1;
        granted++;
      end
    end
  end

  // Next contents: remove the leaving entry, then append granted writes.
  always_comb begin
    int n;
    mem_n = mem;
    pri_n = pri;
    n     = int'(count);
    if (pop) begin
      for (int i = 0; i < W - 1; i++)
        if (i >= int'(sel)) begin
          mem_n[i] = mem[i+1];
          pri_n[i] = pri[i+1];
        end
      n--;
    end
    for (int p = 0; p < NWR; p++) begin
      if (wr_grant[p] && n < W) begin
        mem_n[n] = wr_data[p];
        pri_n[n] = wr_prio[p];
        n++;
      end
    end
    count_n = CW'(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem   <= '0;
      pri   <= '0;
      count <= '0;
    end else begin
      mem   <= mem_n;
      pri   <= pri_n;
      count <= count_n;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= W);
endmodule
