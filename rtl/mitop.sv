// mitop: BBP interface of the MAC, rwbbp (what to write or read, and when) on top of
// mictrl (the serial control-port master). See those two modules for the behaviour;
// this level only joins them and brings out the HFA3861B control-port pins.
// The two-module split is the document's.
module mitop #(
  parameter int unsigned SCLK_DIV = 4
) (
  input  logic        MacClk,
  input  logic        Reset,
  input  logic        TPWrReq,
  input  logic [11:0] TxLen,
  input  logic [1:0]  TxRate,
  input  logic        cfPbcc,
  output logic        TPWrGnt,
  input  logic        RssiReq,
  output logic [7:0]  miRSSI,
  input  logic        cfWrMmiReq,
  input  logic        cfRdMmiReq,
  input  logic [7:0]  cfMMIREGAD,
  input  logic [7:0]  cfMMIWDATA,
  output logic        mmiWrGnt,
  output logic        mmiRdGnt,
  output logic [7:0]  miRdData,
  output logic        miSclk,
  output logic        miRw,
  output logic        miCs,
  output logic        miSdOut,
  output logic        miSdEn,
  input  logic        IoSdIn
);
  logic       wr_req, rd_req, gnt, busy;
  logic [7:0] addr, wdata, rdata;

  rwbbp u_rwbbp (.MacClk, .Reset, .TPWrReq, .TxLen, .TxRate, .cfPbcc, .TPWrGnt, .RssiReq,
                 .miRSSI, .cfWrMmiReq, .cfRdMmiReq, .cfMMIREGAD, .cfMMIWDATA, .mmiWrGnt,
                 .mmiRdGnt, .miRdData, .WrMmiReq(wr_req), .RdMmiReq(rd_req), .MmiAddr(addr),
                 .MmiWData(wdata), .MmiRData(rdata), .MmiGnt(gnt));
  mictrl #(.SCLK_DIV(SCLK_DIV)) u_mictrl (.MacClk, .Reset, .WrMmiReq(wr_req), .RdMmiReq(rd_req),
                 .MmiAddr(addr), .MmiWData(wdata), .MmiRData(rdata), .MmiGnt(gnt),
                 .MmiBusy(busy), .miSclk, .miRw, .miCs, .miSdOut, .miSdEn, .IoSdIn);
  wire unused_ok = busy;
endmodule
