// hc_pkg: types and constants shared by the hypercube routing network.
//
// The routing network exists in three switch variants. They share one
// packet layout so that buffers, queues and links are the same for all:
//   bits [D-1:0]        immediate destination (the destination the switch
//                       routes towards in the current phase)
//   bits [2D-1:D]       final destination
//   bits [3D-1:2D]      dimension mask T (bit j set: dimension j may still be
//                       considered), used by the second randomized variant
//   bit  3D             "all dimensions fixed" flag, second randomized variant
//   bits [3D+DATA_W:3D+1] payload
// The immediate/final order follows the document's bit assignment; the mask
// position and payload width are this design's choice.
package hc_pkg;

  // Switch variant.
  typedef enum logic [1:0] {
    VAR_DET   = 2'd0,  // deterministic bit-fixing (Det-R)
    VAR_RAND1 = 2'd1,  // intermediate destination fixed at injection
    VAR_RAND2 = 2'd2   // intermediate route chosen step by step
  } variant_e;

  // Packet width for a given dimension count and payload width.
  function automatic int pkt_w(input int d, input int data_w);
    return 3 * d + 1 + data_w;
  endfunction

endpackage
