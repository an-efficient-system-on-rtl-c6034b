// ocp_decoder -- address decoder of one master port (combinational).
//
// MAddr is split into a slave index (its top $clog2(N_SLAVES) bits), an
// unused middle field and a local word address (its low MEM_AW bits). The
// decoder drives the one-hot slave select SSEL and checks the address: it is
// illegal when the middle field is not zero (no memory there), when the index
// names no slave, or when this master has no path to that slave in a partial
// crossbar (CONNECT[j] = 0). An illegal address selects no slave; the error
// responder answers it instead. The address map is this design's choice.
module ocp_decoder
  import ocp_pkg::*;
#(
  parameter int unsigned          N_SLAVES = 4,
  parameter int unsigned          MEM_AW   = 8,
  parameter logic [N_SLAVES-1:0]  CONNECT  = '1
) (
  input  logic [ADDR_W-1:0]   maddr,
  output logic [N_SLAVES-1:0] ssel,
  output logic                illegal
);

  localparam int unsigned SW = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;
  localparam int unsigned MID_LO = MEM_AW;
  localparam int unsigned MID_HI = ADDR_W - SW - 1;

  logic [SW-1:0] idx;
  logic          mid_nonzero;

  assign idx = maddr[ADDR_W-1 -: SW];

  always_comb begin
    mid_nonzero = 1'b0;
    for (int b = MID_LO; b <= MID_HI; b++) mid_nonzero |= maddr[b];
  end

  always_comb begin
    ssel    = '0;
    illegal = 1'b1;
    if (!mid_nonzero && int'(idx) < N_SLAVES) begin
      if (CONNECT[idx]) begin
        ssel[idx] = 1'b1;
        illegal   = 1'b0;
      end
    end
  end

endmodule
