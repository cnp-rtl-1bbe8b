// prio_arbiter: the priority manager in front of the external memory.
//
// Each cycle it grants the memory to exactly one of the requesting ports,
// the one with the lowest index (port 0 has the highest priority). The
// grant is combinational from the requests. The CNP paper names a dedicated
// hardware arbiter ("priority manager") multiplexing the memory ports; the
// fixed-priority policy is this design's choice. Starvation cannot block the
// streams: a read port stops requesting once its FIFO is full, which frees
// the memory for the ports behind it.
module prio_arbiter #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  // isolate the lowest set bit
  assign gnt = req & (~req + N'(1));

  always_comb begin
    assert ((gnt & (gnt - N'(1))) == '0)
      else $error("prio_arbiter: more than one grant");
  end

endmodule
