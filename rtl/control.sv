// control: crossbar and buffer control of the CHIP-LINK router.
//
// For every output k the one-hot grant vector grantin[k] from the allocator
// selects which input flit drives portout[k] (a one-hot multiplexer; with no
// grant the output is zero). enable[k] writes output buffer k when output k
// was granted; erase[i] removes the head flit of input i when input i won
// some output. The block is purely combinational, as in the document.
module control #(
  parameter int N = chip_link_pkg::NPORTS,
  parameter int W = chip_link_pkg::FLIT_W
) (
  input  logic [N-1:0][W-1:0] flitin,
  input  logic [N-1:0][N-1:0] grantin,  // grantin[k][i]: output k to input i
  output logic [N-1:0][W-1:0] portout,
  output logic [N-1:0]        erase,    // pop input buffer i
  output logic [N-1:0]        enable    // write output buffer k
);

  always_comb begin
    portout = '0;
    erase   = '0;
    for (int k = 0; k < N; k++) begin
      enable[k] = |grantin[k];
      erase     = erase | grantin[k];
      for (int i = 0; i < N; i++)
        if (grantin[k][i]) portout[k] = portout[k] | flitin[i];
    end
  end

endmodule
