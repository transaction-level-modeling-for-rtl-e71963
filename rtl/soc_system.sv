// soc_system: the shared-bus system: NCORES traffic-generating cores, each
// with an AHB master port and an AHB slave port, on one ahb_bus.
//
// Operation: the cores start on the falling edge of irq (supplied from
// outside, so the bus system can be started together with the network
// system and replay the same traffic). A core's packet to core d becomes a
// single write to address d * 0x28 whose data is the 16-bit payload; it is
// received by core d's slave port in the data phase. Statistics are the same
// as in noc_system; run_cycles counts from the fall of irq until every
// active core has finished and every packet has arrived (done rises).
// CBR, SEED and DIST are passed to every core (see cpu_node).
module soc_system
  import noc_pkg::*;
#(
  parameter int unsigned NCORES = 4,
  parameter int unsigned NPKT   = 1000,
  parameter bit          CBR    = 1'b0,
  parameter logic [31:0] SEED   = 32'h1234_5678,
  parameter dist_e       DIST   = DIST_UNIFORM
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        irq,
  input  logic        active  [NCORES],
  output logic [15:0] sent    [NCORES],
  output logic [15:0] rcvd    [NCORES],
  output logic [15:0] rx_err  [NCORES],
  output logic [31:0] tx_sum_total,
  output logic [31:0] rx_sum_total,
  output logic [31:0] run_cycles,
  output logic        done
);

  logic               req_valid [NCORES];
  logic               req_ready [NCORES];
  logic [IDX_W-1:0]   tx_dest   [NCORES];
  logic [PAYLOAD_W-1:0] tx_payload [NCORES];
  logic               hbusreq   [NCORES];
  logic [ADDR_W-1:0]  m_haddr   [NCORES];
  htrans_e            m_htrans  [NCORES];
  logic               m_hwrite  [NCORES];
  logic [FLIT_W-1:0]  m_hwdata  [NCORES];
  logic               hgrant    [NCORES];
  logic               hready;
  logic [IDX_W-1:0]   hmaster;
  logic               s_hsel    [NCORES];
  logic [ADDR_W-1:0]  s_haddr;
  htrans_e            s_htrans;
  logic               s_hwrite;
  logic [FLIT_W-1:0]  s_hwdata;
  logic               s_hreadyout [NCORES];
  logic               rx_valid  [NCORES];
  logic [ADDR_W-1:0]  rx_addr   [NCORES];
  logic [FLIT_W-1:0]  rx_data   [NCORES];
  logic [31:0]        tx_sum    [NCORES];
  logic [31:0]        rx_sum    [NCORES];
  logic               node_done [NCORES];
  logic               irq_q, started;

  ahb_bus #(.NM(NCORES), .NS(NCORES)) u_bus (
    .clk         (clk),
    .rst_n       (rst_n),
    .hbusreq     (hbusreq),
    .m_haddr     (m_haddr),
    .m_htrans    (m_htrans),
    .m_hwrite    (m_hwrite),
    .m_hwdata    (m_hwdata),
    .hgrant      (hgrant),
    .hready      (hready),
    .hmaster     (hmaster),
    .s_hsel      (s_hsel),
    .s_haddr     (s_haddr),
    .s_htrans    (s_htrans),
    .s_hwrite    (s_hwrite),
    .s_hwdata    (s_hwdata),
    .s_hreadyout (s_hreadyout)
  );

  for (genvar n = 0; n < NCORES; n++) begin : g_core
    cpu_node #(.IDX(n), .NCORES(NCORES), .NPKT(NPKT), .CBR(CBR), .SEED(SEED), .DIST(DIST)) u_cpu (
      .clk        (clk),
      .rst_n      (rst_n),
      .irq        (irq),
      .active     (active[n]),
      .tx_valid   (req_valid[n]),
      .tx_dest    (tx_dest[n]),
      .tx_payload (tx_payload[n]),
      .tx_ready   (req_ready[n]),
      .rx_valid   (rx_valid[n]),
      .rx_dest    (IDX_W'(rx_addr[n] / SLAVE_SIZE)),
      .rx_payload (rx_data[n][PAYLOAD_W-1:0]),
      .sent       (sent[n]),
      .rcvd       (rcvd[n]),
      .rx_err     (rx_err[n]),
      .tx_sum     (tx_sum[n]),
      .rx_sum     (rx_sum[n]),
      .done       (node_done[n])
    );

    ahb_master_port u_mport (
      .clk       (clk),
      .rst_n     (rst_n),
      .req_valid (req_valid[n]),
      .req_addr  (idx_to_addr(int'(tx_dest[n]))),
      .req_data  (FLIT_W'(tx_payload[n])),
      .req_ready (req_ready[n]),
      .hbusreq   (hbusreq[n]),
      .haddr     (m_haddr[n]),
      .htrans    (m_htrans[n]),
      .hwrite    (m_hwrite[n]),
      .hwdata    (m_hwdata[n]),
      .hgrant    (hgrant[n]),
      .hready    (hready)
    );

    ahb_slave_port u_sport (
      .clk       (clk),
      .rst_n     (rst_n),
      .hsel      (s_hsel[n]),
      .haddr     (s_haddr),
      .htrans    (s_htrans),
      .hwrite    (s_hwrite),
      .hwdata    (s_hwdata),
      .hready    (hready),
      .hreadyout (s_hreadyout[n]),
      .rx_valid  (rx_valid[n]),
      .rx_addr   (rx_addr[n]),
      .rx_data   (rx_data[n])
    );
  end

  // totals
  logic [31:0] sent_total, rcvd_total;
  logic        all_done;
  always_comb begin
    sent_total   = '0;
    rcvd_total   = '0;
    tx_sum_total = '0;
    rx_sum_total = '0;
    all_done     = started;
    for (int n = 0; n < int'(NCORES); n++) begin
      sent_total   += 32'(sent[n]);
      rcvd_total   += 32'(rcvd[n]);
      tx_sum_total += tx_sum[n];
      rx_sum_total += rx_sum[n];
      all_done     &= node_done[n];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q      <= 1'b0;
      started    <= 1'b0;
      run_cycles <= '0;
      done       <= 1'b0;
    end else begin
      irq_q <= irq;
      if (irq_q && !irq) started <= 1'b1;
      if (started && !done) begin
        if (all_done && rcvd_total == sent_total) done <= 1'b1;
        else                                      run_cycles <= run_cycles + 32'd1;
      end
    end
  end

  // The bus owner must be one of the cores.
  a_hmaster: assert property (@(posedge clk) disable iff (!rst_n) hmaster < IDX_W'(NCORES));

endmodule
