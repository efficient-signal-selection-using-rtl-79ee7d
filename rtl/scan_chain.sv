// scan_chain -- one shadow scan chain feeding one trace buffer column.
//
// A chain of length LEN monitors LEN flip-flops and dumps each of them once
// every LEN cycles (dumping period T = LEN). In the capture cycle (cap_i = 1)
// the signal at position 0 goes straight to the buffer column while the other
// LEN-1 values are loaded into LEN-1 shadow flip-flops; in the next LEN-1
// cycles the shadow flip-flops shift toward the output, one per cycle. All
// LEN dumped values therefore belong to the same capture cycle, e.g. for
// LEN = 2 the column holds A_1, C_1, A_3, C_3, ... A chain with LEN = 1 has no
// shadow flip-flop and is a plain trace slot.
//
// Interface: sig_i[LEN] are the selected flip-flops, dump_o the bit written
// into the trace buffer this cycle (combinational). cap_i marks the capture
// cycle and adv_i the cycles in which the buffer records; the chain only
// moves when adv_i is high. Both come from the partition's phase counter.
//
// The straight-through dump of position 0 follows the buffer contents the
// design is specified by (the first value of a chain appears in the buffer in
// the cycle it was captured). Reset to zero of the shadow flip-flops is a
// choice of this design.
module scan_chain #(
  parameter int unsigned LEN = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           adv_i,
  input  logic           cap_i,
  input  logic [LEN-1:0] sig_i,
  output logic           dump_o
);

  if (LEN == 1) begin : g_trace
    assign dump_o = sig_i[0];
  end else begin : g_scan
    // shadow[0] is the next value to be dumped.
    logic [LEN-2:0] shadow;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        shadow <= '0;
      end else if (adv_i) begin
        if (cap_i) shadow <= sig_i[LEN-1:1];
        else       shadow <= shadow >> 1;
      end
    end

    assign dump_o = cap_i ? sig_i[0] : shadow[0];
  end

endmodule
