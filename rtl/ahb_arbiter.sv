// AHB arbiter with fixed priorities.
//
// Each bus master raises HBUSREQ; the arbiter grants the bus to the highest
// numbered requesting master (the platform numbers LEON-2 = 0, AES = 1,
// FIR = 2, so FIR has the highest priority).  The grant is a register that is
// re-evaluated only on a clock edge where HREADY is high, so a master that is
// waiting on a slave keeps the bus.  A master that holds HLOCK keeps the grant
// while it still requests.  With no request the bus is parked on master 0
// (LEON-2), which then drives IDLE transfers.
//
// HMASTER names the master that owns the address phase: it takes the value of
// the grant on every edge with HREADY high, which is exactly when a granted
// master may start driving the address bus.  HMASTER_D is the owner of the
// data phase (HMASTER delayed by one completed transfer) and steers HWDATA.
//
// The priority order is the platform's; the grant-on-HREADY, parking and
// locking rules are the usual AMBA 2 choices, made here where the platform's
// description says nothing.
module ahb_arbiter #(
  parameter int unsigned NMST = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NMST-1:0]         hbusreq,
  input  logic [NMST-1:0]         hlock,
  input  logic                    hready,
  output logic [NMST-1:0]         hgrant,
  output logic [$clog2(NMST)-1:0] hmaster,
  output logic [$clog2(NMST)-1:0] hmaster_d,
  output logic                    hmastlock
);

  localparam int unsigned MW = $clog2(NMST);

  logic [MW-1:0] gidx, gidx_next;
  logic          glock;

  // Highest-numbered requester wins; keep a locked owner.
  always_comb begin
    gidx_next = '0;
    for (int unsigned i = 0; i < NMST; i++)
      if (hbusreq[i]) gidx_next = MW'(i);
    if (glock && hbusreq[gidx])
      gidx_next = gidx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gidx      <= '0;
      hmaster   <= '0;
      hmaster_d <= '0;
      hmastlock <= 1'b0;
      glock     <= 1'b0;
    end else if (hready) begin
      gidx      <= gidx_next;
      hmaster   <= gidx;
      hmaster_d <= hmaster;
      hmastlock <= hlock[gidx];
      glock     <= hlock[gidx_next];
    end
  end

  always_comb begin
    hgrant = '0;
    hgrant[gidx] = 1'b1;
  end

  // Exactly one master is granted at any time.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(hgrant));

endmodule
