// pe_input_mux: the input multiplexer in front of the data-RAM write port.
//
// Input 0 is the PE's own ODE datapath result (a resident variable being
// updated); inputs 1..N-1 are the output registers of the neighbouring PEs
// (din[1] in the document's two-PE example is the first neighbour). The
// controller's Input_sel field picks one. Purely combinational; a select
// beyond the last input yields zero. Input numbering is this design's choice.
module pe_input_mux #(
  parameter int N     = 7,
  parameter int W     = 32,
  parameter int SW    = (N > 1) ? $clog2(N) : 1   // select width, may exceed clog2(N)
) (
  input  logic [N-1:0][W-1:0] din,
  input  logic [SW-1:0]       sel,
  output logic [W-1:0]        dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++)
      if (sel == SW'(i)) dout = din[i];
  end

endmodule
