// simple_alloc: per-output allocator of the first (bufferless) simple router.
//
// It looks at the top four bits of the phit in each input register: a 2-bit
// type (head = 3, payload = 2) and a 2-bit output-port route field. A head
// phit whose route field equals this_port requests this output. If the output
// is not held, a fixed-priority chain grants the lowest-numbered requester
// (input 0 first). The winner holds the output for as long as payload phits
// keep arriving on its input: the register last remembers the select of the
// previous cycle, and a payload phit on the previously selected input keeps
// it selected. Heads that lose are not granted; the router drops them.
// select is the one-hot multiplexer select; shift tells the output shifter
// to consume the route field of a newly granted head. The logic follows the
// document; the asynchronous reset of last is this design's addition.
module simple_alloc #(
  parameter int N = chip_link_pkg::NPORTS
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [$clog2(N)-1:0]          this_port,
  input  logic [N-1:0][$clog2(N)+1:0]   top,      // {type[1:0], port} per input
  output logic [N-1:0]                  select,
  output logic                          shift
);

  import chip_link_pkg::*;

  localparam int PW = $clog2(N);

  logic [N-1:0] head, payload, request, hold, grant;
  logic [N-1:0] last;
  logic         avail;

  always_comb begin
    for (int n = 0; n < N; n++) begin
      head[n]    = (top[n][PW+1 -: 2] == PH_HEAD);
      payload[n] = (top[n][PW+1 -: 2] == PH_PAYLOAD);
      request[n] = head[n] && (top[n][PW-1:0] == this_port);
    end
  end

  assign hold  = last & payload;
  assign avail = ~|hold;

  // fixed-priority chain: the carry enters at input 0 when the output is free
  always_comb begin
    logic carry;
    carry = avail;
    for (int n = 0; n < N; n++) begin
      grant[n] = request[n] && carry;
      carry    = carry && !request[n];
    end
  end

  assign select = grant | hold;
  assign shift  = |grant;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) last <= '0;
    else     last <= select;
  end

  a_select_onehot : assert property (@(posedge clk) disable iff (rst)
    $onehot0(select));

endmodule
