// pnp_tb_link_monitor: testbench-only observer of one serial line of a
// host connector link. It samples `data` on every rising edge of `sclk`
// and cuts the bit stream into 36-bit packets, least significant bit
// first, appending each complete packet to the queue `pkts`. Raising
// `clear` (module unplugged) discards a partial packet and restarts the
// framing. It also records the shortest and longest high-to-high period
// of sclk in units of the testbench time step, for rate checks.
module pnp_tb_link_monitor (
  input logic sclk,
  input logic data,
  input logic clear
);
  logic [35:0] pkts [$];
  logic [35:0] sh;
  int          nbits;
  realtime     last_rise, min_period, max_period;

  initial begin
    nbits      = 0;
    sh         = '0;
    last_rise  = -1.0;
    min_period = 1.0e9;
    max_period = 0.0;
  end

  always @(posedge clear) begin
    nbits     = 0;
    last_rise = -1.0;
  end

  always @(posedge sclk) begin
    if (!clear) begin
      sh = {data, sh[35:1]};
      nbits++;
      if (nbits == 36) begin
        pkts.push_back(sh);
        nbits = 0;
      end
      if (last_rise >= 0.0 && nbits != 1) begin
        // only periods inside a packet: the clock may pause between packets
        if ($realtime - last_rise < min_period) min_period = $realtime - last_rise;
        if ($realtime - last_rise > max_period) max_period = $realtime - last_rise;
      end
      last_rise = $realtime;
    end
  end

  function automatic int count(logic [35:0] value);
    int n = 0;
    foreach (pkts[i]) if (pkts[i] == value) n++;
    return n;
  endfunction
endmodule
