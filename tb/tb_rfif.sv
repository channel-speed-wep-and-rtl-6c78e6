// tb_rfif: RF enable sequencing and synthesizer writes. For a frame (TPStart ...
// TPLastBit) each enable must change exactly its configured number of MacClk cycles
// after the start/last-bit event (within one cycle); a frame start while BUSY is ignored;
// manual mode and pin inversion pass the configuration bits through; an 18-bit
// synthesizer word must arrive MSB first on RFSYNCLK rising edges followed by an RFLE
// pulse and RFWrGnt.
module tb_rfif;
  logic clk = 0, rst = 1, tps = 0, tplb = 0, busy = 0, man = 0, inv = 0, swr = 0;
  logic m_tx = 0, m_rx = 0, m_pa = 0, m_pe2 = 0, m_pe1 = 0, m_trsw = 0;
  logic txpe, rxpe, pape, pe2, pe1, trsw, sclk, sdat, le, sgnt; logic [1:0] rs;
  logic [31:0] swd = 0;
  int checks = 0, failures = 0, cyc = 0;
  int t_ev, t_tx, t_rx, t_pa, t_pe2, t_trsw;
  rfif #(.SYN_DIV(3)) dut (.MacClk(clk), .Reset(rst), .TPStart(tps), .TPLastBit(tplb), .BUSY(busy),
    .cfManual(man), .cfTxPe(m_tx), .cfRxPe(m_rx), .cfPaPe(m_pa), .cfPe2(m_pe2), .cfPe1(m_pe1), .cfTrSw(m_trsw),
    .cfRxPe2Pe2(8'd5), .cfRxPe2TxPe(8'd12), .cfRxPe2PaPe(8'd20), .cfRxPe2TrSw(8'd3),
    .cfLdb2Pe2(8'd15), .cfLdb2TxPe(8'd4), .cfLdb2PaPe(8'd2), .cfLdb2TrSw(8'd10), .cfLdb2RxPe(8'd18),
    .cfTxPeInv(inv), .cfPaPeInv(inv), .cfPe2Inv(inv), .cfPe1Inv(inv), .cfNumBit(5'd17),
    .cfSynWrData(swd), .cfSynWrReq(swr), .RFTXPE(txpe), .RFRXPE(rxpe), .RFPAPE(pape), .RFPE2(pe2),
    .RFPE1(pe1), .RFTRSW(trsw), .RFSYNCLK(sclk), .RFSYNDATA(sdat), .RFLE(le), .RFWrGnt(sgnt), .RfState(rs));
  always #5 clk = ~clk;
  logic p_tx, p_rx, p_pa, p_pe2, p_trsw;
  always @(posedge clk) begin
    cyc++;
    p_tx <= txpe; p_rx <= rxpe; p_pa <= pape; p_pe2 <= pe2; p_trsw <= trsw;
    if (txpe != p_tx) t_tx = cyc;
    if (rxpe != p_rx) t_rx = cyc;
    if (pape != p_pa) t_pa = cyc;
    if (pe2 != p_pe2) t_pe2 = cyc;
    if (trsw != p_trsw) t_trsw = cyc;
  end
  logic [31:0] got = 0; int nb = 0, nle = 0;
  always @(posedge sclk) begin got = {got[30:0], sdat}; nb++; end
  always @(posedge le) nle++;
  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic bit near(input int t, input int d);
    return (t - t_ev >= d) && (t - t_ev <= d + 2);
  endfunction
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(negedge clk); rst = 0; repeat (3) @(negedge clk);
    chk(rxpe && !txpe && !pape && !pe2 && pe1 && !trsw, "receive set-up at rest");
    busy = 1; @(negedge clk) tps = 1; @(negedge clk) tps = 0; busy = 0;
    repeat (30) @(negedge clk); chk(rxpe && !txpe, "frame start ignored while BUSY");
    @(negedge clk) tps = 1; t_ev = cyc; @(negedge clk) tps = 0;
    repeat (40) @(negedge clk);
    chk(!rxpe && txpe && pape && pe2 && trsw && rs == 2'd2, "transmit set-up");
    chk(near(t_rx, 0) && near(t_pe2, 5) && near(t_tx, 12) && near(t_pa, 20) && near(t_trsw, 3),
        $sformatf("on delays rx%0d pe2%0d tx%0d pa%0d trsw%0d", t_rx - t_ev, t_pe2 - t_ev, t_tx - t_ev, t_pa - t_ev, t_trsw - t_ev));
    @(negedge clk) tplb = 1; t_ev = cyc; @(negedge clk) tplb = 0;
    repeat (40) @(negedge clk);
    chk(rxpe && !txpe && !pape && !pe2 && !trsw && rs == 2'd0, "back to receive");
    chk(near(t_rx, 18) && near(t_pe2, 15) && near(t_tx, 4) && near(t_pa, 2) && near(t_trsw, 10),
        $sformatf("off delays rx%0d pe2%0d tx%0d pa%0d trsw%0d", t_rx - t_ev, t_pe2 - t_ev, t_tx - t_ev, t_pa - t_ev, t_trsw - t_ev));
    man = 1; m_tx = 1; m_pa = 0; m_pe2 = 1; m_pe1 = 0; m_trsw = 1; m_rx = 0; inv = 1; @(negedge clk);
    chk(!txpe && pape && !pe2 && pe1 && trsw && !rxpe, "manual mode with inversion");
    man = 0; inv = 0;
    swd = 32'h0002_D5A3; @(negedge clk) swr = 1; @(negedge clk) swr = 0;
    while (!sgnt) @(negedge clk);
    chk(nb == 18 && got[17:0] == swd[17:0] && nle == 1, $sformatf("synthesizer word %h, %0d bits, %0d LE", got[17:0], nb, nle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
