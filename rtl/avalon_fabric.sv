// avalon_fabric -- Avalon memory-mapped interconnect for the processor's
// data master.
//
// The master's byte address is compared with every window of ADDR_MAP
// (music_player_pkg). The one slave whose window holds it receives the
// request, with read/write qualified and the address turned into a word
// offset inside the window; all other slaves see read = write = 0. The
// selected slave's readdata and waitrequest go back to the master
// combinationally, so a slave's wait states pass straight through. An
// address outside every window completes at once with readdata 0 and
// raises decode_error for that cycle.
//
// The fabric is combinational and adds no latency. That Avalon connects
// the processor to every peripheral is the reference system's; the single
// master and the decoding structure are this design's.
module avalon_fabric
  import music_player_pkg::*;
(
  input  avm_req_t                    m_req,
  output avm_rsp_t                    m_rsp,
  output avm_req_t [NUM_SLAVES-1:0]   s_req,
  input  avm_rsp_t [NUM_SLAVES-1:0]   s_rsp,
  output logic                        decode_error
);
  logic [NUM_SLAVES-1:0] hit;

  always_comb begin
    m_rsp = '{readdata: '0, waitrequest: 1'b0};
    for (int i = 0; i < NUM_SLAVES; i++) begin
      hit[i]                = (m_req.address >= ADDR_MAP[i].base) &&
                              (m_req.address <= ADDR_MAP[i].last);
      s_req[i]              = m_req;
      s_req[i].address      = (m_req.address - ADDR_MAP[i].base) >> 2;
      s_req[i].read         = m_req.read  && hit[i];
      s_req[i].write        = m_req.write && hit[i];
      if (hit[i]) m_rsp     = s_rsp[i];
    end
    decode_error = (m_req.read || m_req.write) && (hit == '0);
  end

endmodule
