// tb_lzw_ref_pkg: software reference for the testbenches.
//
// lzw_encode is a plain sequential LZW encoder with the compressor's rules:
// codes 0..255 are single bytes, new strings get codes 256, 257, ... until
// `entries` have been added, strings are at most `max_len` bytes long (a string
// of max_len bytes is emitted without adding anything), and the table starts
// empty every `page` bytes. lzw_decode undoes it, so a testbench can check that
// compression is lossless without trusting the encoder. transform_pairs applies
// the reading transform (H0 L0 H1 L1 -> H0 H1 L0 L1) in software.
package tb_lzw_ref_pkg;

  typedef byte unsigned  bytes_q_t[$];
  typedef int unsigned   codes_q_t[$];

  // Key of a string in the reference table: length in the top bits, the bytes
  // (newest lowest) below.
  function automatic longint unsigned key_of(bytes_q_t s);
    longint unsigned k = 0;
    foreach (s[i]) k = (k << 8) | longint'(s[i]);
    return (longint'(s.size()) << 40) | k;
  endfunction

  function automatic codes_q_t lzw_encode(bytes_q_t data, int unsigned entries,
                                          int unsigned max_len, int unsigned page);
    codes_q_t out;
    int unsigned tbl[longint unsigned];
    int unsigned n_new = 0;
    bytes_q_t cur;
    int unsigned cur_code = 0;
    for (int unsigned i = 0; i < data.size(); i++) begin
      byte unsigned b = data[i];
      if (cur.size() == 0) begin
        cur.push_back(b);
        cur_code = int'(b);
      end else begin
        bytes_q_t cand = cur;
        cand.push_back(b);
        if (cur.size() < max_len && tbl.exists(key_of(cand))) begin
          cur = cand;
          cur_code = tbl[key_of(cand)];
        end else begin
          out.push_back(cur_code);
          if (cur.size() < max_len && n_new < entries) begin
            tbl[key_of(cand)] = 256 + n_new;
            n_new++;
          end
          cur.delete();
          cur.push_back(b);
          cur_code = int'(b);
        end
      end
      if ((i + 1) % page == 0 || i + 1 == data.size()) begin
        out.push_back(cur_code);
        cur.delete();
        tbl.delete();
        n_new = 0;
      end
    end
    return out;
  endfunction

  // Decodes one page worth of codes (the table starts empty).
  function automatic bytes_q_t lzw_decode_page(codes_q_t codes, int unsigned entries,
                                               int unsigned max_len);
    bytes_q_t out;
    bytes_q_t strs[int unsigned];
    bytes_q_t prev;
    int unsigned n_new = 0;
    foreach (codes[k]) begin
      bytes_q_t s;
      int unsigned c = codes[k];
      if (c < 256) begin
        s.push_back(byte'(c));
      end else if (strs.exists(c)) begin
        s = strs[c];
      end else begin
        // The code being defined by this very step: prev + first byte of prev.
        s = prev;
        s.push_back(prev[0]);
      end
      if (k > 0 && prev.size() < max_len && n_new < entries) begin
        bytes_q_t e = prev;
        e.push_back(s[0]);
        strs[256 + n_new] = e;
        n_new++;
      end
      foreach (s[j]) out.push_back(s[j]);
      prev = s;
    end
    return out;
  endfunction

  function automatic bytes_q_t transform_pairs(bytes_q_t data);
    bytes_q_t out;
    for (int unsigned i = 0; i + 4 <= data.size(); i += 4) begin
      out.push_back(data[i]);
      out.push_back(data[i+2]);
      out.push_back(data[i+1]);
      out.push_back(data[i+3]);
    end
    return out;
  endfunction

endpackage
