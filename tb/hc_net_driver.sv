// hc_net_driver: plays the processors of one hypercube network for a
// workload and scores the delivered packets.
//
// Workloads (wl): 0 random permutation, one packet per switch; 1 transpose
// permutation (the id's upper and lower halves swapped; for odd D the id is
// rotated by D/2), one packet per switch; 2 D random permutations, so every
// switch sends and receives D packets; 3 the transpose sent D times; 4 a
// saturation test beyond the document's loads: the transpose sent 4D times
// back to back, to drive output queues full. The
// driver starts injecting when `start` rises (and clears itself when it
// falls, ready for the next workload), each switch offering its
// packets one after another on the valid/ready injection port. The payload
// of every packet is its number. A delivery must occur at the packet's
// final destination, with the destination fields intact (immediate equal
// to final, or for the second variant the "all fixed" flag set), exactly
// once; when all packets are in, `done` rises and `cycles` holds the
// cycles from start to the last delivery.
module hc_net_driver
  import hc_pkg::*;
#(
  parameter int       D       = 4,
  parameter int       DATA_W  = 8,
  parameter variant_e VARIANT = VAR_DET,
  localparam int N     = 1 << D,
  localparam int PKT_W = 3 * D + 1 + DATA_W,
  localparam int NIN   = D + 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  int                               wl,
  output logic [N-1:0]                     inj_valid,
  output logic [N-1:0][D-1:0]              inj_fdest,
  output logic [N-1:0][DATA_W-1:0]         inj_data,
  input  logic [N-1:0]                     inj_ready,
  input  logic [N-1:0][NIN-1:0]            dlv_valid,
  input  logic [N-1:0][NIN-1:0][PKT_W-1:0] dlv_pkt,
  output logic                             done,
  output int                               checks,
  output int                               failures,
  output int                               cycles,
  output int                               npkts
);
  int PPS;                                   // packets per switch
  int dest_of[N * 4 * D];                        // packet number -> final destination
  bit got[N * 4 * D];
  int sent[N];
  int delivered;

  function automatic int transpose(input int s);
    int h;
    h = D / 2;
    return ((s << (D - h)) | (s >> h)) & (N - 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n || !start) begin
      for (int s = 0; s < N; s++) sent[s] <= 0;
    end else begin
      for (int s = 0; s < N; s++) if (inj_valid[s] && inj_ready[s]) sent[s] <= sent[s] + 1;
    end
  end

  always_comb begin
    for (int s = 0; s < N; s++) begin
      inj_valid[s] = start && rst_n && (sent[s] < PPS);
      inj_fdest[s] = D'(dest_of[s * PPS + ((sent[s] < PPS) ? sent[s] : 0)]);
      inj_data[s]  = DATA_W'(s * PPS + sent[s]);
    end
  end

  initial begin
    int perm[N];
    checks = 0; failures = 0; cycles = 0; done = 0; PPS = 1; npkts = N;
    forever begin
    wait (!start);
    done = 0; cycles = 0; delivered = 0;
    for (int t = 0; t < N * 4 * D; t++) got[t] = 0;
    wait (start);
    PPS = (wl == 4) ? 4 * D : (wl >= 2) ? D : 1;
    npkts = N * PPS;
    for (int r = 0; r < PPS; r++) begin
      for (int s = 0; s < N; s++) perm[s] = s;
      if (wl == 0 || wl == 2)
        for (int s = N - 1; s > 0; s--) begin
          int j, t;
          j = $urandom_range(0, s); t = perm[s]; perm[s] = perm[j]; perm[j] = t;
        end
      else
        for (int s = 0; s < N; s++) perm[s] = transpose(s);
      for (int s = 0; s < N; s++) dest_of[s * PPS + r] = perm[s];
    end
    while (delivered < npkts) begin
      @(posedge clk);
      cycles++;
      for (int s = 0; s < N; s++)
        for (int q = 0; q < NIN; q++)
          if (dlv_valid[s][q]) begin
            int tag;
            logic ok;
            tag = int'(dlv_pkt[s][q][PKT_W-1:3*D+1]);
            ok = (tag < npkts) && !got[tag] && dest_of[tag] == s && int'(dlv_pkt[s][q][2*D-1:D]) == s;
            if (VARIANT == VAR_RAND2) ok = ok && dlv_pkt[s][q][3*D];
            else                      ok = ok && int'(dlv_pkt[s][q][D-1:0]) == s;
            checks++;
            if (!ok) begin
              failures++;
              $display("FAIL variant %0d workload %0d: packet %0d delivered at %0d (dest %0d, seen %0d)",
                       VARIANT, wl, tag, s, (tag < npkts) ? dest_of[tag] : -1, (tag < npkts) ? got[tag] : 0);
            end
            if (tag < npkts && !got[tag]) begin got[tag] = 1; delivered++; end
          end
    end
    done = 1;
    end
  end
endmodule
