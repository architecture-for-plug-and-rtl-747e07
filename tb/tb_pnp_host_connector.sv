// tb_pnp_host_connector: tests one host connector against bit-level
// models, written in the testbench, of a module, the switch and a
// register.
//   module:   on each rising edge of ser_clk samples ser_data_out and,
//             60 ns later, puts out its next bit; packets (36 bits, LSB
//             first) come from a queue, zeros when the queue is empty;
//   switch:   answers a connection request after 4 cycles with either a
//             held accepted or a one-cycle rejected;
//   register: offers a list of updated (offset, data) pairs, lowest
//             first, removing each when acknowledged.
// The test plugs a module, rejects the first request, accepts the retry
// and checks every packet the host sends (0xAA, filler, 0x8000000AA,
// filler, 0xCC, echo of the ID at offset 0, 0xCC, {1, 0x10C00}, idle
// headers), the module-to-register write after a 0xCC from the module,
// the 200 ns bit period, the pause of the clock while the switch decides,
// and that unplugging stops the clock and drops the request at once.
`timescale 1ns/1ps
module tb_pnp_host_connector;
  import pnp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n;
  always #10 clk = ~clk;

  // bit clock enables, as the divider makes them (period 10 cycles)
  logic rise_tick, fall_tick;
  int   tcnt;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin tcnt <= 0; rise_tick <= 0; fall_tick <= 0; end
    else begin
      tcnt      <= (tcnt == 9) ? 0 : tcnt + 1;
      rise_tick <= (tcnt == 4);
      fall_tick <= (tcnt == 9);
    end

  logic        att_n, ser_data_in, ser_data_out, ser_clk, conn_pending;
  logic        conn_req, accepted, rejected;
  logic [31:0] conn_id;
  reg2hc_t     reg_in;
  hc2reg_t     reg_out;

  pnp_host_connector dut (.clk, .rst_n, .rise_tick, .fall_tick, .att_n, .ser_data_in,
                          .ser_data_out, .ser_clk, .conn_pending, .conn_req, .conn_id,
                          .accepted, .rejected, .reg_in, .reg_out);

  // ---------------- module model ----------------
  logic [35:0] mod_tx_q [$];
  logic [35:0] host_pkts [$];
  logic [35:0] mod_pkts [$];
  logic [35:0] m_rx, m_tx;
  int          m_bits;
  realtime     last_rise = -1.0, min_per = 1.0e9, max_per = 0.0, max_gap = 0.0;

  initial begin m_bits = 0; m_tx = '0; ser_data_in = 1'b0; end

  always @(posedge ser_clk) begin
    if (!att_n) begin
      m_rx = {ser_data_out, m_rx[35:1]};
      if (last_rise >= 0.0) begin
        if (m_bits != 0) begin
          if ($realtime - last_rise < min_per) min_per = $realtime - last_rise;
          if ($realtime - last_rise > max_per) max_per = $realtime - last_rise;
        end else if ($realtime - last_rise > max_gap) max_gap = $realtime - last_rise;
      end
      last_rise = $realtime;
      m_bits++;
      if (m_bits == 36) begin
        host_pkts.push_back(m_rx);
        m_bits = 0;
        m_tx = (mod_tx_q.size() > 0) ? mod_tx_q.pop_front() : 36'h0;
        mod_pkts.push_back(m_tx);
      end else begin
        m_tx = m_tx >> 1;
      end
      #60 ser_data_in = m_tx[0];
    end
  end

  // data out may only change while ser_clk is low
  logic prev_out;
  always @(posedge clk) begin
    prev_out <= ser_data_out;
    if (rst_n && ser_clk && prev_out != ser_data_out && !att_n) begin
      failures++;
      $display("FAIL: data out changed while the bit clock was high");
    end
  end

  // ---------------- switch model ----------------

  int n_req = 0;
  initial begin accepted = 0; rejected = 0; end
  always @(posedge conn_req) begin
    n_req++;
    repeat (4) @(posedge clk);
    #1;
    if (n_req >= 2) accepted = 1'b1;
    else begin
      rejected = 1'b1;
      @(posedge clk); #1 rejected = 1'b0;
    end
  end
  always @(negedge conn_req) #1 accepted = 1'b0;

  // ---------------- register model ----------------
  logic [3:0]  upd_a [$];
  logic [31:0] upd_d [$];
  int          n_ack = 0, n_we = 0;
  logic [3:0]  we_addr;
  logic [31:0] we_data;
  always_comb begin
    reg_in = '0;
    reg_in.id = 32'h5;
    if (accepted && upd_a.size() > 0) begin
      reg_in.upd      = 1'b1;
      reg_in.upd_addr = upd_a[0];
      reg_in.upd_data = upd_d[0];
    end
  end
  always @(posedge clk) begin
    if (reg_out.ack) begin
      n_ack++;
      if (upd_a.size() == 0 || reg_out.ack_addr != upd_a[0]) begin
        failures++; $display("FAIL: ack of a location not offered");
      end else begin
        void'(upd_a.pop_front()); void'(upd_d.pop_front());
      end
    end
    if (reg_out.we) begin
      n_we++; we_addr = reg_out.waddr; we_data = reg_out.wdata;
    end
  end

  realtime t_plug, t_first;
  int      np;

  initial begin
    rst_n = 1'b0; att_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (50) @(posedge clk);
    check(!ser_clk && conn_pending && !conn_req, "idle without a module");

    // module: ID 5 twice (first request rejected), then idle headers,
    // then 0xCC and a data packet in its third header/data slot
    // (the model's packet 0 is all zeros; the queue starts at packet 1)
    mod_tx_q = '{36'h5, 36'h0, 36'h5, 36'h0, 36'h0, 36'h0, 36'h0,
                 36'h0CC, 36'h7_DEAD_BEEF};
    upd_a = '{4'd0, 4'd1};
    upd_d = '{32'h5, 32'h10C00};

    @(negedge clk);
    att_n = 1'b0;
    t_plug = $realtime;
    @(posedge ser_clk);
    t_first = $realtime;
    check(t_first - t_plug <= 2 * 200.0 + 60.0, "stream starts within two bit periods");

    wait (host_pkts.size() >= 11);
    np = host_pkts.size();
    check(host_pkts[0] == 36'h0_0000_00AA, "packet 0: identification request 0xAA");
    check(host_pkts[1] == 36'h0, "packet 1: host filler");
    check(host_pkts[2] == 36'h8_0000_00AA, "after rejection: alternate request");
    check(host_pkts[3] == 36'h0, "second packet 1 filler");
    check(host_pkts[4] == 36'h0_0000_00CC, "first header 0xCC");
    check(host_pkts[5] == 36'h0_0000_0005, "ID echo at offset 0");
    check(host_pkts[6] == 36'h0_0000_00CC, "second header 0xCC");
    check(host_pkts[7] == 36'h1_0001_0C00, "0x10C00 at offset 1");
    check(host_pkts[8] == 36'h0 && host_pkts[10] == 36'h0, "idle headers when in sync");
    check(n_req == 2, "two connection requests");
    check(conn_id == 32'h5, "module ID forwarded to the switch");
    check(!conn_pending && conn_req, "connected, request held");
    check(n_ack == 2, "both locations acknowledged");
    check(n_we == 1 && we_addr == 4'd7 && we_data == 32'hDEAD_BEEF,
          "module data written to offset 7");
    check(min_per == 200.0 && max_per == 200.0, "bit period 200 ns inside packets");
    check(max_gap > 200.0, "clock paused while the switch decided");

    // a new update while connected
    @(negedge clk);
    upd_a.push_back(4'd9); upd_d.push_back(32'h0000_0042);
    wait (host_pkts.size() >= np + 4);
    check(host_pkts.size() > 0, "stream continues");
    begin
      bit found = 0;
      for (int i = np - 1; i + 1 < host_pkts.size(); i++)
        if (host_pkts[i] == 36'h0CC && host_pkts[i+1] == 36'h9_0000_0042) found = 1;
      check(found, "later update sent as 0xCC then {9, 0x42}");
    end

    // unplug in the middle of a packet
    repeat (57) @(posedge clk);
    @(negedge clk);
    att_n = 1'b1;
    repeat (4) @(posedge clk); #1;
    check(!conn_req && conn_pending, "unplug drops the request at once");
    np = host_pkts.size();
    repeat (400) @(posedge clk);
    check(!ser_clk && ser_data_out == 1'b0 && host_pkts.size() == np, "no clock after unplug");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
