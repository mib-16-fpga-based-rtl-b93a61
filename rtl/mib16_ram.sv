// mib16_ram: the external word memory of MIB-16.
//
// 2**ADDR_W words of 16 bits (64K words by default, the full reach of the
// 16-bit address bus; the original's board test used a 1K-word RAM with 10
// address bits, which is ADDR_W = 10). A transfer is requested by holding
// ram_en high with a_bus, we and d_in stable. The memory starts a transfer on
// the first rising edge that sees ram_en high while it is idle, waits
// WAIT_STATES further cycles, then in one edge performs the write (we high)
// or loads the addressed word into d_out (we low) and raises ready for
// exactly one cycle. With WAIT_STATES = 0 this is the two-clock T1/T2 bus
// cycle of the original timing diagrams: request in T1, data and READY in
// T2. A request still high in the cycle of the READY pulse is not taken as a
// new one. Only the low ADDR_W bits of the address are used. The memory
// content is not reset; fetch is accepted for completeness and does not
// change the behaviour.
module mib16_ram #(
  parameter int unsigned ADDR_W      = 16,
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        ram_en,
  input  logic        we,
  input  logic        fetch,
  input  logic [15:0] a_bus,
  input  logic [15:0] d_in,    // write data (the processor's D_OUT)
  output logic [15:0] d_out,   // read data (the processor's D_IN)
  output logic        ready
);

  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam int unsigned CW    = (WAIT_STATES > 0) ? $clog2(WAIT_STATES + 1) : 1;

  logic [15:0]       mem [DEPTH];
  logic              active;
  logic [CW-1:0]     cnt;
  logic              start, done;
  logic [ADDR_W-1:0] addr;

  assign addr  = a_bus[ADDR_W-1:0];
  assign start = ram_en && !active && !ready;
  assign done  = (start && WAIT_STATES == 0) || (active && cnt == '0);

  always_ff @(posedge clk) begin
    if (reset) begin
      active <= 1'b0;
      cnt    <= '0;
      ready  <= 1'b0;
    end else begin
      ready <= done;
      if (done)       active <= 1'b0;
      else if (start) begin
        active <= 1'b1;
        cnt    <= CW'(WAIT_STATES - 1);
      end else if (active) cnt <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (done) begin
      if (we) mem[addr] <= d_in;
      else    d_out     <= mem[addr];
    end
  end

  // The requester keeps the transfer stable until it has seen READY.
  assert property (@(posedge clk) disable iff (reset)
    active |-> ram_en && $stable(a_bus) && $stable(we));

  // Unused: the memory treats instruction and data reads alike.
  logic unused_fetch;
  assign unused_fetch = fetch;

endmodule
