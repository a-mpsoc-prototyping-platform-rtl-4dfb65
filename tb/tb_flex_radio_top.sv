// tb_flex_radio_top: end-to-end test of the whole platform at its default
// parameters. The three processors are modelled by threads that drive
// their bus ports, interrupt lines and FSL ports; the RF front end is a
// loopback from the DAC bus to the ADC bus with added noise, and an SPI
// slave model collects front-end control words.
//
// Scenario (one 802.11 DSSS frame sent and received over the loopback):
//   OS   writes a payload to the shared memory and posts {length, address}
//        in the mailbox.
//   MAC  takes the mailbox interrupt, reads the payload from the shared
//        memory, keeps a copy in its local memory and passes it to the PLCP
//        processor over the MAC->PLCP FSL link.
//   PLCP configures the PHY (switch rules, enables, SPI word to the front
//        end), inits both chains, then writes the PHY frame to the TX
//        chain: 128 sync bits of ones, the SFD and a 48-bit header at ID 1
//        (DBPSK, 1 Mb/s) and the payload at ID 2 (DQPSK, 2 Mb/s). The TX
//        demux and mux switch on ID 2. When the first DQPSK symbol reaches
//        the receiver, the PLCP model sets the receive ID to 2, as the
//        PLCP firmware would after reading the header, so the RX demux and
//        mux switch too. Received bytes (header and payload, with IDs) are
//        checked; payload bytes go back to the MAC over the PLCP->MAC link.
//   MAC  takes the FSL interrupt, stores the received payload in the shared
//        memory, waits one SIFS (1000 cycles) with the timer and posts the
//        result to the OS, which compares it with what it sent.
//   PLCP then stops reading the RX FSL port until the receiver overflows,
//        and clears the overflow with an RX chain init.
// Every mechanism is counted (mailbox both ways, shared memory, FSL links,
// SPI, chain init, TX back-pressure, TX/RX demux and mux switches, SFD
// detection, RX overflow, timer, each processor's interrupt); a mechanism
// that never happened is a failure.
module tb_flex_radio_top;
  import radio_pkg::*;
  logic clk = 0, rst_n = 0, clk_rf = 0, rst_rf_n = 0;
  always #5 clk = ~clk;            // 100 MHz
  always #11.36 clk_rf = ~clk_rf;  // 44 MHz
  int checks = 0, failures = 0;

  bus_req_t os_req = '0, mac_req = '0, plcp_req = '0;
  logic [31:0] os_rdata, mac_rdata, plcp_rdata;
  logic os_irq, mac_irq, plcp_irq;
  logic [31:0] mac_fsl_m_data = '0, mac_fsl_s_data; logic mac_fsl_m_control = 0, mac_fsl_m_write = 0, mac_fsl_m_full;
  logic mac_fsl_s_control, mac_fsl_s_exists, mac_fsl_s_read = 0;
  logic [31:0] plcp_fsl_s_data, plcp_fsl_m_data = '0; logic plcp_fsl_s_control, plcp_fsl_s_exists, plcp_fsl_s_read = 0;
  logic plcp_fsl_m_control = 0, plcp_fsl_m_write = 0, plcp_fsl_m_full;
  logic [31:0] tx_fsl_m_data = '0; logic tx_fsl_m_control = 0, tx_fsl_m_write = 0, tx_fsl_m_full;
  logic [31:0] rx_fsl_s_data; logic rx_fsl_s_control, rx_fsl_s_exists, rx_fsl_s_read = 0;
  logic [SAMPLE_W-1:0] adc_data = '0, dac_data;
  logic spi_sclk, spi_cs_n, spi_mosi;

  flex_radio_top dut (.*);

  // ---------------- mechanism counters ----------------
  typedef enum int {M_MBOX_OS2MAC, M_MBOX_MAC2OS, M_SHARED_MEM, M_LOCAL_MEM, M_FSL_MAC2PLCP,
                    M_FSL_PLCP2MAC, M_SPI, M_CHAIN_INIT, M_TX_STALL, M_TX_DEMUX_SW, M_TX_MUX_SW,
                    M_SFD, M_RX_DEMUX_SW, M_RX_MUX_SW, M_RX_OVERFLOW, M_TIMER, M_OS_IRQ,
                    M_MAC_IRQ, M_PLCP_IRQ, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"mailbox OS->MAC", "mailbox MAC->OS", "shared memory", "local memory",
    "FSL MAC->PLCP", "FSL PLCP->MAC", "SPI word", "chain init", "TX back-pressure", "TX demux switch",
    "TX mux switch", "SFD detect", "RX demux switch", "RX mux switch", "RX overflow", "timer expiry",
    "OS interrupt", "MAC interrupt", "PLCP interrupt"};

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- bus access, one port per processor ----------------
  localparam int OS = 0, MAC = 1, PLCP = 2;
  task automatic set_req(int p, bus_req_t r);
    case (p) OS: os_req = r; MAC: mac_req = r; default: plcp_req = r; endcase
  endtask
  task automatic wr(int p, logic [31:0] a, logic [31:0] d);
    @(negedge clk); set_req(p, '{cs: 1, we: 1, be: 4'hF, addr: a, wdata: d});
    @(negedge clk); set_req(p, '0);
  endtask
  task automatic rd(int p, logic [31:0] a, output logic [31:0] d);
    @(negedge clk); set_req(p, '{cs: 1, we: 0, be: 4'hF, addr: a, wdata: '0});
    @(negedge clk); set_req(p, '0);
    d = p == OS ? os_rdata : p == MAC ? mac_rdata : plcp_rdata;
  endtask

  // address maps
  localparam logic [31:0] OS_SHARED = 32'h0_0000, OS_MBOX = 32'h1_0000, OS_INTC = 32'h2_0000;
  localparam logic [31:0] MAC_LOCAL = 32'h0_0000, MAC_SHARED = 32'h1_0000, MAC_MBOX = 32'h2_0000,
                          MAC_INTC = 32'h3_0000, MAC_TIMER = 32'h4_0000;
  localparam logic [31:0] PLCP_LOCAL = 32'h0_0000, PLCP_INTC = 32'h1_0000, PLCP_CHAIN = 32'h2_0000,
                          PLCP_REGS = 32'h3_0000, PLCP_SPI = 32'h4_0000;
  // intc registers
  localparam logic [31:0] ISR = 'h0, IER = 'h8, IAR = 'hC, MER = 'h10;

  // ---------------- frame ----------------
  localparam int N_SYNC = 16, N_HDR = 6, N_PAY = 64;     // bytes
  localparam int N_BPSK_SYM = 8 * (N_SYNC + 2 + N_HDR);  // DBPSK symbols before the payload
  localparam logic [3:0] ID_HDR = 4'd1, ID_PAY = 4'd2;
  logic [7:0] payload [N_PAY];
  logic [7:0] header [N_HDR];

  // ---------------- RF loopback (DAC bus -> ADC bus) ----------------
  // I is on the bus while clk_rf is high, Q while low. The model takes
  // each half after it settles and presents it to the ADC input half a
  // period later, so I reaches the rising edge and Q the falling edge.
  logic signed [SAMPLE_W-1:0] cap_i = 0, cap_q = 0;
  int tx_samples = 0;
  event ev_payload_at_rx;
  function automatic logic [SAMPLE_W-1:0] noisy(logic signed [SAMPLE_W-1:0] v);
    return SAMPLE_W'(v + SAMPLE_W'($urandom_range(0, 32)) - SAMPLE_W'(16));
  endfunction
  always @(posedge clk_rf) begin
    #4 cap_i = dac_data;
    #2 adc_data = noisy(cap_q);
  end
  always @(negedge clk_rf) begin
    #4 cap_q = dac_data;
    adc_data = noisy(cap_i);
    if (cap_i != 0 || cap_q != 0) begin
      tx_samples++;
      if (tx_samples == SPS * CHIPS * N_BPSK_SYM + 2) -> ev_payload_at_rx;
    end
  end

  // ---------------- SPI slave model ----------------
  logic [15:0] spi_sh; int spi_bits = 0; logic [15:0] spi_words [$];
  always @(posedge spi_sclk) if (!spi_cs_n) begin spi_sh = {spi_sh[14:0], spi_mosi}; spi_bits++; end
  always @(posedge spi_cs_n) if (rst_n) begin
    if (spi_bits == 16) spi_words.push_back(spi_sh);
    spi_bits = 0;
  end

  // interrupt and stall monitors
  logic os_irq_q = 0, mac_irq_q = 0, plcp_irq_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (os_irq && !os_irq_q) mech[M_OS_IRQ]++;
    if (mac_irq && !mac_irq_q) mech[M_MAC_IRQ]++;
    if (plcp_irq && !plcp_irq_q) mech[M_PLCP_IRQ]++;
    os_irq_q = os_irq; mac_irq_q = mac_irq; plcp_irq_q = plcp_irq;
  end

  // ---------------- OS processor ----------------
  logic os_done = 0;
  task automatic os_main();
    logic [31:0] d;
    wr(OS, OS_INTC + IER, 1); wr(OS, OS_INTC + MER, 1);
    for (int w = 0; w < N_PAY / 4; w++)
      wr(OS, OS_SHARED + 32'h100 + 4*w, {payload[4*w+3], payload[4*w+2], payload[4*w+1], payload[4*w]});
    wr(OS, OS_MBOX + 'h0, {16'(N_PAY), 16'h0100});
    mech[M_MBOX_OS2MAC]++;
    while (!os_irq) @(negedge clk);
    rd(OS, OS_INTC + ISR, d); chk(d[0], "OS mailbox interrupt");
    rd(OS, OS_MBOX + 'h4, d);
    mech[M_MBOX_MAC2OS]++;
    wr(OS, OS_INTC + IAR, 1);
    chk(d[31:16] == N_PAY, "OS: received length");
    for (int w = 0; w < N_PAY / 4; w++) begin
      automatic logic [31:0] v;
      rd(OS, OS_SHARED + d[15:0] + 4*w, v);
      checks++;
      if (v != {payload[4*w+3], payload[4*w+2], payload[4*w+1], payload[4*w]}) begin
        failures++; $display("FAIL OS: received word %0d %h", w, v);
      end
    end
    mech[M_SHARED_MEM]++;
    os_done = 1;
  endtask

  // ---------------- MAC processor ----------------
  logic mac_done = 0;
  task automatic mac_main();
    logic [31:0] d, msg; logic [7:0] rx [$]; int t0;
    wr(MAC, MAC_INTC + IER, 7); wr(MAC, MAC_INTC + MER, 1);
    while (!mac_irq) @(negedge clk);
    rd(MAC, MAC_INTC + ISR, d); chk(d[0], "MAC mailbox interrupt");
    rd(MAC, MAC_MBOX + 'h4, msg);
    wr(MAC, MAC_INTC + IAR, 1);
    // frame from the shared memory into local memory, then to the PLCP
    for (int w = 0; w < msg[31:16] / 4; w++) begin
      rd(MAC, MAC_SHARED + msg[15:0] + 4*w, d);
      wr(MAC, MAC_LOCAL + 4*w, d);
    end
    for (int w = 0; w < msg[31:16] / 4; w++) begin
      rd(MAC, MAC_LOCAL + 4*w, d);
      chk(d == {payload[4*w+3], payload[4*w+2], payload[4*w+1], payload[4*w]}, "MAC local memory copy");
      for (int b = 0; b < 4; b++) begin
        @(negedge clk); while (mac_fsl_m_full) @(negedge clk);
        mac_fsl_m_data = 32'(d[8*b +: 8]); mac_fsl_m_control = (w == 0 && b == 0);
        mac_fsl_m_write = 1;
        @(negedge clk); mac_fsl_m_write = 0;
        mech[M_FSL_MAC2PLCP]++;
      end
    end
    mech[M_LOCAL_MEM]++;
    // received payload back from the PLCP
    while (rx.size() < N_PAY) begin
      while (!mac_irq) @(negedge clk);
      rd(MAC, MAC_INTC + ISR, d);
      if (d[2]) begin
        while (mac_fsl_s_exists) begin
          rx.push_back(mac_fsl_s_data[7:0]);
          mac_fsl_s_read = 1; @(negedge clk); mac_fsl_s_read = 0;
          mech[M_FSL_PLCP2MAC]++;
        end
        wr(MAC, MAC_INTC + IAR, 4);
      end else @(negedge clk);
    end
    for (int w = 0; w < N_PAY / 4; w++)
      wr(MAC, MAC_SHARED + 32'h800 + 4*w, {rx[4*w+3], rx[4*w+2], rx[4*w+1], rx[4*w]});
    // one SIFS before answering
    wr(MAC, MAC_TIMER + 'h4, 1000);
    wr(MAC, MAC_TIMER + 'h0, 1);
    t0 = $time;
    while (!mac_irq) @(negedge clk);
    rd(MAC, MAC_INTC + ISR, d);
    chk(d[1], "MAC timer interrupt");
    chk(($time - t0) / 10 >= 1000 && ($time - t0) / 10 <= 1003, $sformatf("SIFS took %0d cycles", ($time - t0) / 10));
    mech[M_TIMER]++;
    wr(MAC, MAC_TIMER + 'hC, 1); wr(MAC, MAC_INTC + IAR, 2);
    wr(MAC, MAC_MBOX + 'h0, {16'(N_PAY), 16'h0800});
    mac_done = 1;
  endtask

  // ---------------- PLCP processor ----------------
  logic [7:0] got_payload [$];
  task automatic plcp_tx(logic [7:0] b, id_t id);
    @(negedge clk);
    if (tx_fsl_m_full) mech[M_TX_STALL]++;
    while (tx_fsl_m_full) @(negedge clk);
    tx_fsl_m_data = {20'b0, id, b}; tx_fsl_m_write = 1;
    @(negedge clk); tx_fsl_m_write = 0;
  endtask

  task automatic plcp_main();
    logic [31:0] d; logic [7:0] frame [$]; int n;
    wr(PLCP, PLCP_INTC + IER, 32'hFF); wr(PLCP, PLCP_INTC + MER, 1);
    // front-end setup word over SPI
    wr(PLCP, PLCP_SPI + 'h8, 2);
    wr(PLCP, PLCP_SPI + 'h0, 32'hA5C3);
    while (!plcp_irq) @(negedge clk);
    rd(PLCP, PLCP_INTC + ISR, d); chk(d[6], "SPI done interrupt");
    wr(PLCP, PLCP_INTC + IAR, 32'h40);
    chk(spi_words.size() == 1 && spi_words[0] == 16'hA5C3, "SPI word at the front end");
    mech[M_SPI]++;
    // PHY configuration: header on path 0 (DBPSK), switch to path 1 (DQPSK) on the payload ID
    wr(PLCP, PLCP_REGS + 'h10, {25'b0, 1'b0, 1'b1, 1'b1, ID_PAY});   // RX demux
    wr(PLCP, PLCP_REGS + 'h14, {25'b0, 1'b0, 1'b1, 1'b1, ID_PAY});   // RX mux
    wr(PLCP, PLCP_REGS + 'h18, {25'b0, 1'b0, 1'b1, 1'b1, ID_PAY});   // TX demux
    wr(PLCP, PLCP_REGS + 'h1C, {25'b0, 1'b0, 1'b1, 1'b1, ID_PAY});   // TX mux
    wr(PLCP, PLCP_REGS + 'h00, {24'b0, ID_HDR, 4'b0011});            // rx_en, tx_en, rx_id
    repeat (10) @(negedge clk);
    wr(PLCP, PLCP_CHAIN, 3);
    mech[M_CHAIN_INIT]++;
    // frame from the MAC
    while (!plcp_fsl_s_exists) @(negedge clk);
    rd(PLCP, PLCP_INTC + ISR, d); chk(d[7], "PLCP FSL interrupt");
    chk(plcp_fsl_s_control, "first FSL word flagged by the control bit");
    while (frame.size() < N_PAY) begin
      if (plcp_fsl_s_exists) begin
        frame.push_back(plcp_fsl_s_data[7:0]);
        plcp_fsl_s_read = 1; @(negedge clk); plcp_fsl_s_read = 0;
      end else @(negedge clk);
    end
    for (int k = 0; k < N_PAY; k++) wr(PLCP, PLCP_LOCAL + 4*k, 32'(frame[k]));
    // PLCP header: SIGNAL (2 Mb/s), SERVICE, LENGTH (microseconds), CRC left at 0
    header = '{8'h14, 8'h00, 8'(N_PAY * 4), 8'((N_PAY * 4) >> 8), 8'h00, 8'h00};
    fork
      begin // transmit
        repeat (N_SYNC) plcp_tx(8'hFF, ID_HDR);
        plcp_tx(SFD_8021[7:0], ID_HDR); plcp_tx(SFD_8021[15:8], ID_HDR);
        foreach (header[k]) plcp_tx(header[k], ID_HDR);
        for (int k = 0; k < N_PAY; k++) begin
          automatic logic [31:0] v;
          rd(PLCP, PLCP_LOCAL + 4*k, v);
          plcp_tx(v[7:0], ID_PAY);
        end
      end
      begin // receive ID follows the frame: payload at ID 2
        @(ev_payload_at_rx);
        wr(PLCP, PLCP_REGS + 'h00, {24'b0, ID_PAY, 4'b0011});
      end
      begin // receive: header then payload, payload forwarded to the MAC
        int nb = 0;
        while (nb < N_HDR + N_PAY) begin
          @(negedge clk);
          if (rx_fsl_s_exists && $urandom_range(0, 1)) begin
            automatic logic [31:0] w = rx_fsl_s_data;
            rx_fsl_s_read = 1; @(negedge clk); rx_fsl_s_read = 0;
            if (nb < N_HDR) chk(w == {20'b0, ID_HDR, header[nb]}, $sformatf("header byte %0d: %h", nb, w));
            else begin
              chk(w[11:8] == ID_PAY, $sformatf("payload ID %h", w[11:8]));
              @(negedge clk); while (plcp_fsl_m_full) @(negedge clk);
              plcp_fsl_m_data = 32'(w[7:0]); plcp_fsl_m_write = 1;
              @(negedge clk); plcp_fsl_m_write = 0;
            end
            nb++;
          end
        end
      end
    join
    rd(PLCP, PLCP_INTC + ISR, d);
    if (d[0]) mech[M_SFD]++;
    if (d[1]) mech[M_RX_DEMUX_SW]++;
    if (d[2]) mech[M_RX_MUX_SW]++;
    if (d[3]) mech[M_TX_DEMUX_SW]++;
    if (d[4]) mech[M_TX_MUX_SW]++;
    chk(d[5] == 0, "no overflow while reading");
    wr(PLCP, PLCP_INTC + IAR, 32'h1F);
    // receiver keeps producing bytes from noise; stop reading until it overflows
    n = 0;
    do begin rd(PLCP, PLCP_INTC + ISR, d); n++; end while (!d[5] && n < 50000);
    chk(d[5], "RX overflow interrupt");
    if (d[5]) mech[M_RX_OVERFLOW]++;
    wr(PLCP, PLCP_CHAIN, 2);                 // RX init clears it
    mech[M_CHAIN_INIT]++;
    repeat (20) @(negedge clk);
    wr(PLCP, PLCP_INTC + IAR, 32'h20);
    rd(PLCP, PLCP_INTC + ISR, d);
    chk(!d[5], "overflow cleared by RX init");
    chk(!rx_fsl_s_exists, "RX FIFO emptied by init");
    wr(PLCP, PLCP_REGS + 'h00, 0);
    rd(PLCP, PLCP_CHAIN, d);
    chk(d == {16'd2, 16'd1}, $sformatf("chain init counts %h", d));
  endtask

  initial begin
    foreach (payload[k]) payload[k] = 8'($urandom);
    repeat (3) @(negedge clk); rst_n = 1; rst_rf_n = 1;
    fork
      os_main();
      mac_main();
      plcp_main();
    join
    chk(os_done && mac_done, "all processors finished");
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-18s %0d", mech_name[m], mech[m]);
      chk(mech[m] > 0, $sformatf("mechanism never happened: %s", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: os_done %0d mac_done %0d, %0d TX samples seen", os_done, mac_done, tx_samples);
    for (int m = 0; m < M_NUM; m++) $display("mechanism %-18s %0d", mech_name[m], mech[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
